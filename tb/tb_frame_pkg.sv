// tb_frame_pkg: test images and a reference full search for the testbenches.
//
// The previous frame is a hash of the pixel position, so that every block
// is distinct. The frame being coded is built from it by moving each
// macroblock by its own displacement (some beyond the search range),
// clamping at the frame edge, and perturbing some pixels, so the best match
// is neither always exact nor always inside the range. `ref_search` is an
// independent model of exhaustive block matching over dx, dy in -M .. M-1,
// skipping candidates outside the frame, first minimum in dx-major order.
package tb_frame_pkg;

  function automatic int unsigned hash2(int unsigned x, int unsigned y, int unsigned seed);
    int unsigned h;
    h = x * 32'h9E3779B1 + y * 32'h85EBCA77 + seed * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return h;
  endfunction

  function automatic logic [7:0] prev_pix(int x, int y);
    return 8'(hash2(x, y, 1) >> 8);
  endfunction

  function automatic int clamp(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // displacement of macroblock (bx, by), roughly -1.2M .. 1.2M
  function automatic int mb_motion(int bx, int by, int axis, int m);
    int span;
    span = (m * 12) / 10;
    return int'(hash2(bx, by, 7 + axis) % (2 * span + 1)) - span;
  endfunction

  function automatic logic [7:0] cur_pix(int x, int y, int n, int m, int w, int h);
    int sx, sy;
    logic [7:0] p;
    sx = clamp(x + mb_motion(x / n, y / n, 0, m), 0, w - 1);
    sy = clamp(y + mb_motion(x / n, y / n, 1, m), 0, h - 1);
    p  = prev_pix(sx, sy);
    if (hash2(x, y, 3) % 8 == 0) p = p + 8'(hash2(x, y, 4) % 5);
    return p;
  endfunction

  typedef struct {
    int mvx;
    int mvy;
    int sad;
  } ref_result_t;

  function automatic ref_result_t ref_search(int bx, int by, int n, int m, int w, int h);
    ref_result_t best;
    logic [7:0] blk [16][16];
    best.sad = -1;
    best.mvx = 0;
    best.mvy = 0;
    for (int j = 0; j < n; j++)
      for (int k = 0; k < n; k++)
        blk[j][k] = cur_pix(bx * n + k, by * n + j, n, m, w, h);
    for (int dx = -m; dx < m; dx++) begin
      int cx;
      cx = bx * n + dx;
      if (cx < 0 || cx + n > w) continue;
      for (int dy = -m; dy < m; dy++) begin
        int cy, sad;
        cy = by * n + dy;
        if (cy < 0 || cy + n > h) continue;
        sad = 0;
        for (int j = 0; j < n && (best.sad < 0 || sad < best.sad); j++)
          for (int k = 0; k < n; k++) begin
            int a, b;
            a = int'(blk[j][k]);
            b = int'(prev_pix(cx + k, cy + j));
            sad += (a > b) ? a - b : b - a;
          end
        if (best.sad < 0 || sad < best.sad) begin
          best.sad = sad;
          best.mvx = dx;
          best.mvy = dy;
        end
      end
    end
    return best;
  endfunction

endpackage
