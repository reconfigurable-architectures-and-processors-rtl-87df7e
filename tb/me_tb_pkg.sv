// me_tb_pkg: test data shared by the architecture-A testbenches.
//
// - A synthetic image: a smooth cone-shaped texture with a little
//   position-dependent noise. The current frame is tex(x, y); the reference
//   (previous) frame is the same texture moved, ref(x, y) = tex(x+SX, y+SY),
//   so the true motion vector of every interior macroblock is (-SX, -SY) with
//   SAD 0.
// - The search-pattern tables: region 0 full search over -8..+7, region 1
//   three-step search, region 2 diamond search (large diamond, vertex and
//   edge re-search patterns, final small diamond), region 3 the nine-point
//   three-step example pattern.
// - A software model of the pattern-table search used as the reference.
package me_tb_pkg;
  import me_a_pkg::*;

  localparam int SX = 3;
  localparam int SY = -2;

  function automatic int tex(int x, int y);
    int v;
    v = ((x > 20 ? x - 20 : 20 - x) + (y > 10 ? y - 10 : 10 - y)) * 3 / 4 + ((x * x * 7 + y * y * 13 + x * y * 3) % 11);
    return (v > 255) ? 255 : v;
  endfunction

  function automatic int cur_pix(int x, int y);
    return tex(x, y);
  endfunction

  function automatic int ref_pix(int x, int y);
    return tex(x + SX, y + SY);
  endfunction

  typedef struct {
    bit see, ste;
    int npa, dx, dy;
  } tent_t;

  typedef tent_t tent_t_q[$];

  // Diamond search: large-diamond points in table order
  function automatic void ld_point(int i, output int dx, output int dy);
    int lx[8] = '{0, 1, 2, 1, 0, -1, -2, -1};
    int ly[8] = '{-2, -1, 0, 1, 2, 1, 0, -1};
    dx = lx[i]; dy = ly[i];
  endfunction

  // first pattern address of the re-search region for a winning LD point
  function automatic int ds_region(int i);
    int r[8] = '{9, 15, 19, 25, 29, 35, 39, 45};
    return r[i];
  endfunction

  function automatic void build_table(int sel, output tent_t t[$]);
    tent_t e;
    t = {};
    case (sel)
      0: begin  // full search, 256 candidates in one step
        for (int dy = -8; dy < 8; dy++)
          for (int dx = -8; dx < 8; dx++) begin
            e = '{see: 0, ste: 0, npa: 0, dx: dx, dy: dy};
            t.push_back(e);
          end
        t[255].see = 1; t[255].ste = 1;
      end
      1: begin  // three-step search, step sizes 4, 2, 1
        int s[3] = '{4, 2, 1};
        for (int st = 0; st < 3; st++)
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) begin
              if (st == 2 && dx == 0 && dy == 0) continue;
              e = '{see: 0, ste: 0, npa: (st == 0) ? 9 : 18, dx: dx * s[st], dy: dy * s[st]};
              t.push_back(e);
            end
        // centre entries first in each of the first two steps
        t = reorder_3ss(t);
        t[8].ste = 1; t[17].ste = 1; t[25].ste = 1; t[25].see = 1;
      end
      2: begin  // diamond search
        int dx, dy;
        e = '{see: 0, ste: 0, npa: 49, dx: 0, dy: 0};
        t.push_back(e);
        for (int i = 0; i < 8; i++) begin
          ld_point(i, dx, dy);
          e = '{see: 0, ste: (i == 7), npa: ds_region(i), dx: dx, dy: dy};
          t.push_back(e);
        end
        for (int r = 0; r < 8; r++) begin
          int vx, vy, n0;
          ld_point(r, vx, vy);
          n0 = t.size();
          e = '{see: 0, ste: 0, npa: 49, dx: 0, dy: 0};
          t.push_back(e);
          for (int i = 0; i < 8; i++) begin
            int d;
            ld_point(i, dx, dy);
            d = dx * vx + dy * vy;
            if ((r % 2 == 0) ? (d >= 0) : (d > 0)) begin
              e = '{see: 0, ste: 0, npa: ds_region(i), dx: dx, dy: dy};
              t.push_back(e);
            end
          end
          t[t.size() - 1].ste = 1;
        end
        begin
          int sx[4] = '{0, 1, 0, -1};
          int sy[4] = '{-1, 0, 1, 0};
          for (int i = 0; i < 4; i++) begin
            e = '{see: (i == 3), ste: (i == 3), npa: 0, dx: sx[i], dy: sy[i]};
            t.push_back(e);
          end
        end
      end
      default: begin  // nine-point example, three steps
        int ex[9] = '{0, -9, 9, 0, 0, -2, 2, -1, 1};
        int ey[9] = '{0, -9, -9, 9, -2, 2, 2, -1, 1};
        for (int i = 0; i < 9; i++) begin
          e = '{see: (i == 8), ste: (i == 3 || i == 6 || i == 8),
                npa: (i < 4) ? 4 : 7, dx: ex[i], dy: ey[i]};
          t.push_back(e);
        end
      end
    endcase
  endfunction

  // put the centre (0,0) entry first within steps 1 and 2 of the 3SS table
  function automatic tent_t_q reorder_3ss(tent_t q[$]);
    tent_t r[$];
    for (int st = 0; st < 2; st++) begin
      r.push_back(q[st * 9 + 4]);
      for (int i = 0; i < 9; i++) if (i != 4) r.push_back(q[st * 9 + i]);
    end
    for (int i = 18; i < q.size(); i++) r.push_back(q[i]);
    return r;
  endfunction

  function automatic patt_entry_t to_entry(tent_t e, int frame_w);
    patt_entry_t p;
    p.see    = e.see;
    p.ste    = e.ste;
    p.npa    = NPA_W'(e.npa);
    p.dx     = MV_W'(e.dx);
    p.dy     = MV_W'(e.dy);
    p.raster = ADDR_W'(e.dy * frame_w + e.dx);
    return p;
  endfunction

  function automatic int block_sad(int mbx, int mby, int cx, int cy);
    int s = 0;
    for (int m = 0; m < 16; m++)
      for (int n = 0; n < 16; n++) begin
        int a, b;
        a = cur_pix(mbx + n, mby + m);
        b = ref_pix(cx + n, cy + m);
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  // Reference search with the table semantics of the estimator.
  function automatic void model(tent_t t[$], int mbx, int mby, int w, int h,
                                output int mvx, output int mvy, output int sad,
                                output int n_valid, output int n_skip);
    int accx = 0, accy = 0, minsad = 65535, bdx = 0, bdy = 0, bnpa = 0, pa = 0;
    bit improved = 0;
    n_valid = 0; n_skip = 0;
    for (int guard = 0; guard < 10000; guard++) begin
      tent_t e = t[pa];
      int cx = mbx + accx + e.dx, cy = mby + accy + e.dy;
      if (cx >= 0 && cy >= 0 && cx + 16 <= w && cy + 16 <= h) begin
        int s = block_sad(mbx, mby, cx, cy);
        n_valid++;
        if (s <= minsad) begin minsad = s; bdx = e.dx; bdy = e.dy; bnpa = e.npa; improved = 1; end
      end else n_skip++;
      if (e.ste || e.see) begin
        accx += bdx; accy += bdy; bdx = 0; bdy = 0;
        if (e.see) break;
        pa = improved ? bnpa : e.npa;
        improved = 0;
      end else pa++;
    end
    mvx = accx; mvy = accy; sad = minsad;
  endfunction

endpackage
