// tb_ref_pkg: reference clustering used by the testbenches.
//
// Holds one detector frame as plain arrays, finds its clusters by flood fill over the eight
// neighbours of every hit pixel (edges and corners join), and keeps the expected clusters in a
// list that DUT output is ticked off against. It shares no code with the RTL: it works on
// the whole frame at once instead of on a sorted stream. Centroids are formed as in the RTL
// contract: (sum x*E << 4) / sum E, truncated, 0 when the energy sum is 0.
package tb_ref_pkg;
  import clust_pkg::*;

  typedef struct {
    longint npix, esum, sxe, sye;
    int     last_y;
  } ref_cl_t;

  bit      hit  [ROWS][COLS];
  int      ener [ROWS][COLS];
  ref_cl_t expect_q[$];

  function automatic void clear_frame();
    foreach (hit[y, x]) begin
      hit[y][x]  = 0;
      ener[y][x] = 0;
    end
    expect_q.delete();
  endfunction

  // Returns 1 when the pixel was new.
  function automatic bit add_pixel(int x, int y, int e);
    if (hit[y][x]) return 0;
    hit[y][x]  = 1;
    ener[y][x] = e;
    return 1;
  endfunction

  function automatic void cluster_frame();
    bit seen [ROWS][COLS];
    int qx[$], qy[$];
    expect_q.delete();
    foreach (seen[y, x]) seen[y][x] = 0;
    for (int y0 = 0; y0 < ROWS; y0++)
      for (int x0 = 0; x0 < COLS; x0++)
        if (hit[y0][x0] && !seen[y0][x0]) begin
          ref_cl_t c = '{0, 0, 0, 0, 0};
          seen[y0][x0] = 1;
          qx.push_back(x0);
          qy.push_back(y0);
          while (qx.size() > 0) begin
            int px = qx.pop_front();
            int py = qy.pop_front();
            c.npix++;
            c.esum += ener[py][px];
            c.sxe  += longint'(ener[py][px]) * px;
            c.sye  += longint'(ener[py][px]) * py;
            if (py > c.last_y) c.last_y = py;
            for (int dy = -1; dy <= 1; dy++)
              for (int dx = -1; dx <= 1; dx++) begin
                int nx = px + dx, ny = py + dy;
                if (nx >= 0 && nx < COLS && ny >= 0 && ny < ROWS)
                  if (hit[ny][nx] && !seen[ny][nx]) begin
                    seen[ny][nx] = 1;
                    qx.push_back(nx);
                    qy.push_back(ny);
                  end
              end
          end
          expect_q.push_back(c);
        end
  endfunction

  // Ticks off one expected cluster with these sums; 0 when none is left.
  function automatic bit take(longint npix, longint esum, longint sxe, longint sye, int last_y);
    foreach (expect_q[i])
      if (expect_q[i].npix == npix && expect_q[i].esum == esum && expect_q[i].sxe == sxe &&
          expect_q[i].sye == sye && expect_q[i].last_y == last_y) begin
        expect_q.delete(i);
        return 1;
      end
    return 0;
  endfunction

  function automatic longint centroid(longint s, longint esum);
    return (esum == 0) ? 0 : (s << FRAC) / esum;
  endfunction

  // Same test on centroid fields instead of raw sums.
  function automatic bit take_out(longint npix, longint esum, longint cx, longint cy, int last_y);
    foreach (expect_q[i])
      if (expect_q[i].npix == npix && expect_q[i].esum == esum &&
          centroid(expect_q[i].sxe, expect_q[i].esum) == cx &&
          centroid(expect_q[i].sye, expect_q[i].esum) == cy && expect_q[i].last_y == last_y) begin
        expect_q.delete(i);
        return 1;
      end
    return 0;
  endfunction
endpackage
