// me_model_pkg: reference model used by the testbenches. It defines the
// synthetic test video (a frame memory that answers for any coordinate)
// and a plain software diamond search, written independently of the RTL.
//
// Video: each frame f is a periodic landscape of triangle waves plus a small
// texture; the reference frame is the current frame displaced by the
// frame's true motion (mot_x(f), mot_y(f)), so the best vector of every
// block is that motion. The search rules mirror the engine's specification:
// large diamond (9 points), at most 1 + MAX_ITER large diamonds, small
// diamond (4 points), ties kept by the centre and then by the lower index in
// the order up, up-left, up-right, left, centre, right, down-left,
// down-right, down (small: up, left, right, down).
package me_model_pkg;

  function automatic int tri_wave(input int v);
    int m;
    m = ((v % 64) + 64) % 64;
    return (m > 32) ? m - 32 : 32 - m;
  endfunction

  function automatic int mot_x(input int f);
    case (f % 4) 0: return 2; 1: return 9; 2: return -15; default: return 22; endcase
  endfunction
  function automatic int mot_y(input int f);
    case (f % 4) 0: return 1; 1: return -7; 2: return 11; default: return 20; endcase
  endfunction

  function automatic int cur_pix(input int f, input int x, input int y);
    return 4 * tri_wave(x + 5 * f) + 3 * tri_wave(y + 3 * f) + (((x * 7) ^ (y * 3) ^ f) & 7);
  endfunction

  function automatic int ref_pix(input int f, input int x, input int y);
    return cur_pix(f, x - mot_x(f), y - mot_y(f));
  endfunction

  function automatic int block_sad(input int f, input int bx, input int by,
                                   input int rx, input int ry);
    int s;
    s = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int d;
        d = cur_pix(f, bx + c, by + r) - ref_pix(f, rx + c, ry + r);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic int ldx(input int i);
    int t[9] = '{0, -1, 1, -2, 0, 2, -1, 1, 0};
    return t[i];
  endfunction
  function automatic int ldy(input int i);
    int t[9] = '{-2, -1, -1, 0, 0, 0, 1, 1, 2};
    return t[i];
  endfunction
  function automatic int sdx(input int i);
    int t[4] = '{0, -1, 1, 0};
    return t[i];
  endfunction
  function automatic int sdy(input int i);
    int t[4] = '{-1, 0, 0, 1};
    return t[i];
  endfunction

  typedef struct {
    int mvx, mvy, sad, n_ldsp;
    bit early;    // ended on a centre win before the iteration limit
    bit limit;    // stopped by the iteration limit
  } ds_res_t;

  // one diamond search from start point (sx, sy) of block (bx, by)
  function automatic ds_res_t ds_search(input int f, input int bx, input int by,
                                        input int sx, input int sy, input int max_iter);
    ds_res_t r;
    int cx, cy, csad, best, bi, s;
    cx = sx; cy = sy; r.n_ldsp = 0; r.early = 0; r.limit = 0;
    forever begin
      best = block_sad(f, bx, by, bx + cx, by + cy);
      bi = 4;
      for (int i = 0; i < 9; i++) begin
        s = block_sad(f, bx, by, bx + cx + ldx(i), by + cy + ldy(i));
        if (s < best) begin best = s; bi = i; end
      end
      r.n_ldsp++;
      csad = best;
      if (bi == 4) begin r.early = 1; break; end
      cx += ldx(bi); cy += ldy(bi);
      if (r.n_ldsp == max_iter + 1) begin r.limit = 1; break; end
    end
    r.mvx = cx; r.mvy = cy; r.sad = csad;
    for (int i = 0; i < 4; i++) begin
      s = block_sad(f, bx, by, bx + cx + sdx(i), by + cy + sdy(i));
      if (s < r.sad) begin r.sad = s; r.mvx = cx + sdx(i); r.mvy = cy + sdy(i); end
    end
    return r;
  endfunction

  function automatic int start_x(input int core, input int d);
    case (core) 1, 4: return d; 2, 3: return -d; default: return 0; endcase
  endfunction
  function automatic int start_y(input int core, input int d);
    case (core) 1, 2: return d; 3, 4: return -d; default: return 0; endcase
  endfunction

endpackage
