// pixel_sorter: reorders one frame of pixels into {y, x} order.
//
// The clustering engine needs its input sorted by {y, x}; some detectors send their pixels in
// another order. This block collects a whole frame in a frame buffer, then reads it out in
// order. The frame buffer is an energy memory with one word per pixel and an occupancy memory
// with one COLS-bit word per row. During fill each pixel sets its occupancy bit and writes its
// energy (a repeated pixel overwrites the earlier one). An end-of-frame token starts the drain:
// for the current row a priority encoder picks the lowest occupied column, the pixel is sent
// and its bit cleared; an empty row is skipped in one clock. After the last row the
// end-of-frame token is sent and the buffer is empty again, ready for the next frame. After
// reset the occupancy memory is cleared row by row (ROWS clocks) before input is accepted.
// Only the need for sorted input comes from the algorithm; the frame-buffer method is this
// design's choice.
//
// Interface: valid/ready pixel streams with an end-of-frame flag, as the engine's input.
// Timing: fill takes one clock per pixel; drain one clock per pixel plus one per row visited,
// so at most pixels + ROWS + 1 clocks. No input is accepted while draining.
module pixel_sorter
  import clust_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  logic   in_eof,
  input  pixel_t in_pix,
  output logic   out_valid,
  input  logic   out_ready,
  output logic   out_eof,
  output pixel_t out_pix
);
  typedef enum logic [1:0] {S_CLEAR, S_FILL, S_DRAIN, S_EOF} state_t;
  state_t state;

  logic [COLS-1:0] occ  [ROWS];
  logic [EW-1:0]   emem [ROWS*COLS];
  logic [YW-1:0]   row;

  // one row-wide access to the occupancy memory per clock
  logic [YW-1:0]   occ_addr;
  logic [COLS-1:0] occ_rd, occ_wd;
  logic            occ_we;

  logic            row_any;
  logic [XW-1:0]   first_x;

  always_comb begin
    row_any = |occ_rd;
    first_x = '0;
    for (int i = COLS - 1; i >= 0; i--)
      if (occ_rd[i]) first_x = XW'(i);
  end

  assign occ_addr = (state == S_FILL) ? in_pix.y : row;
  assign occ_rd   = occ[occ_addr];

  always_comb begin
    in_ready  = (state == S_FILL);
    out_valid = 1'b0;
    out_eof   = 1'b0;
    out_pix   = '{y: row, x: first_x, e: emem[{row, first_x}]};
    occ_we    = 1'b0;
    occ_wd    = occ_rd;
    unique case (state)
      S_CLEAR: begin
        occ_we = 1'b1;
        occ_wd = '0;
      end
      S_FILL: if (in_valid && !in_eof) begin
        occ_we           = 1'b1;
        occ_wd[in_pix.x] = 1'b1;
      end
      S_DRAIN: if (row_any) begin
        out_valid = 1'b1;
        if (out_ready) begin
          occ_we          = 1'b1;
          occ_wd[first_x] = 1'b0;
        end
      end
      S_EOF: begin
        out_valid = 1'b1;
        out_eof   = 1'b1;
        out_pix   = '0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (occ_we) occ[occ_addr] <= occ_wd;
    if (state == S_FILL && in_valid && !in_eof) emem[{in_pix.y, in_pix.x}] <= in_pix.e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR;
      row   <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          row <= row + 1'b1;
          if (row == YW'(ROWS - 1)) state <= S_FILL;
        end
        S_FILL: if (in_valid && in_eof) begin
          row   <= '0;
          state <= S_DRAIN;
        end
        S_DRAIN: if (!row_any) begin
          if (row == YW'(ROWS - 1)) state <= S_EOF;
          else                      row   <= row + 1'b1;
        end
        S_EOF: if (out_ready) begin
          row   <= '0;
          state <= S_FILL;
        end
        default: state <= S_FILL;
      endcase
    end
  end
endmodule
