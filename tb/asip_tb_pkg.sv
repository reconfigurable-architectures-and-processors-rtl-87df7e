// asip_tb_pkg: a small assembler for the ME processor and the reference
// full-search program used by its testbenches.
package asip_tb_pkg;
  import asip_pkg::*;

  function automatic logic [15:0] i_ld(bit t);            return {3'b000, t, 12'd0}; endfunction
  function automatic logic [15:0] i_j(int cc, int a);     return {3'b001, 2'(cc), 1'b0, 10'(a)}; endfunction
  function automatic logic [15:0] i_movr(int rd, int rs); return {3'b010, 5'(rd), 3'd0, 5'(rs)}; endfunction
  function automatic logic [15:0] i_movc(bit t, int rd, int k); return {3'b011, t, 4'(rd), 8'(k)}; endfunction
  function automatic logic [15:0] i_sad16(int rd, int a, int b); return {3'b100, 1'b0, 4'(rd), 4'(a), 4'(b)}; endfunction
  function automatic logic [15:0] i_div2(int rd, int a);  return {3'b101, 1'b0, 4'(rd), 4'(a), 4'd0}; endfunction
  function automatic logic [15:0] i_add(int rd, int a, int b); return {3'b110, 1'b0, 4'(rd), 4'(a), 4'(b)}; endfunction
  function automatic logic [15:0] i_sub(int rd, int a, int b); return {3'b111, 1'b0, 4'(rd), 4'(a), 4'(b)}; endfunction

  // load a 16-bit constant into a GPR (two MOVC)
  function automatic void li(ref logic [15:0] p[$], input int rd, input int v);
    p.push_back(i_movc(0, rd, v & 255));
    p.push_back(i_movc(1, rd, (v >> 8) & 255));
  endfunction

  // Full search over a (2p+1)x(2p+1) window for the MB at (mbx, mby) of a
  // w x h frame; outputs the MV through R20 ([7:0] x, [15:8] y) and halts.
  // Register use: R0 zero, R2 one, R3 0x100, R4 2p+1, R5 best SAD,
  // R6 best origin {ty,tx}, R7 ty<<8, R8 tx, R9 origin, R10 line, R11 SAD,
  // R12 scratch, R13 (2p+1)<<8, R14 p, R15 best tx.
  function automatic void fsbm_program(output logic [15:0] p[$], input int w, input int h,
                                       input int mbx, input int mby, input int rng);
    int loopy, loopx, better, next, fix, outl, halt, jb, jn, jx, jy, jf, jo;
    p = {};
    li(p, 1, w);   p.push_back(i_movr(R_FRAME_W, 1));
    li(p, 1, h);   p.push_back(i_movr(R_FRAME_H, 1));
    li(p, 1, mbx); p.push_back(i_movr(R_MB_X, 1));
    li(p, 1, mby); p.push_back(i_movr(R_MB_Y, 1));
    li(p, 1, rng); p.push_back(i_movr(R_RANGE, 1));
    p.push_back(i_ld(0));
    p.push_back(i_ld(1));
    li(p, 0, 0);
    li(p, 2, 1);
    li(p, 3, 256);
    li(p, 4, 2 * rng + 1);
    li(p, 13, (2 * rng + 1) * 256);
    li(p, 5, 16'h7FFF);
    li(p, 6, 0);
    li(p, 14, rng);
    li(p, 15, 0);
    li(p, 7, 0);
    loopy = p.size();
    li(p, 8, 0);
    loopx = p.size();
    p.push_back(i_add(9, 7, 8));
    p.push_back(i_add(10, 9, 0));
    p.push_back(i_sub(11, 11, 11));
    for (int i = 0; i < 16; i++) p.push_back(i_sad16(11, 10, 9));
    p.push_back(i_sub(12, 11, 5));
    jb = p.size(); p.push_back(0);             // J NEG better
    jn = p.size(); p.push_back(0);             // J next
    better = p.size();
    p.push_back(i_add(5, 11, 0));
    p.push_back(i_add(6, 9, 0));
    p.push_back(i_add(15, 8, 0));
    next = p.size();
    p.push_back(i_add(8, 8, 2));
    p.push_back(i_sub(12, 8, 4));
    jx = p.size(); p.push_back(0);             // J NEG loopx
    p.push_back(i_add(7, 7, 3));
    p.push_back(i_sub(12, 7, 13));
    jy = p.size(); p.push_back(0);             // J NEG loopy
    li(p, 1, rng * 257);
    p.push_back(i_sub(12, 6, 1));              // {ty-p, tx-p} with borrow
    p.push_back(i_sub(1, 15, 14));             // tx - p
    jf = p.size(); p.push_back(0);             // J NEG fix
    jo = p.size(); p.push_back(0);             // J out
    fix = p.size();
    p.push_back(i_add(12, 12, 3));             // undo the borrow
    outl = p.size();
    p.push_back(i_movr(R_MV_OUT, 12));
    p.push_back(i_movr(22, 5));
    halt = p.size();
    p.push_back(i_j(0, halt));
    p[jb] = i_j(1, better);
    p[jn] = i_j(0, next);
    p[jx] = i_j(1, loopx);
    p[jy] = i_j(1, loopy);
    p[jf] = i_j(1, fix);
    p[jo] = i_j(0, outl);
  endfunction

endpackage
