// cpama_prog_pkg: a small assembler and program generator for testbenches.
//
// Builds per-processor programs on an NH x NW array: the two below for
// neighbourhood depth r = 1, and gen_dotr (described further down), a
// (2r+1) x (2r+1) dot product for any r:
//  * dot3: y(i,j) = sum over dy,dx in -1..1 of c[(dy+1)*3+(dx+1)] * x(i+dy, j+dx)
//    (a 3 x 3 dot product / filter). All processors run the same slot
//    structure in lock step; a slot a processor does not need is a NOP.
//    Phase 1: each processor sends the pixels of its own column to its east
//    and west neighbours, row by row, and receives theirs (East has priority
//    over West, so the east pixel is received first). Phase 2: a processor
//    computes, for the row it holds, the partial sums its north and south
//    neighbours need (kernel rows +1 and -1) and sends them; then it adds its
//    own row, plus either the rows above/below it holds (edge processors) or
//    the partial sums received (middle processors). Constants 0..8 hold c.
//  * point: y = (x * c[9]) >>> c[10], a point operation.
// Register map of processor (i,j): FIFO-bound registers first, row-major over
// the rows and columns it holds; then west pixels, east pixels, a temporary.
package cpama_prog_pkg;
  import cpama_pkg::*;

  function automatic instr_t i_nop();
    instr_t i;
    i = '0;
    i.op = OP_NOP; i.alusrc = AS_REG_CONST; i.dir = DIR_N; i.pcsrc = PC_NEXT;
    return i;
  endfunction

  function automatic instr_t i_alu(alu_op_e op, alu_src_e src, int rs, int csel,
                                   bit enacc, bit regwe, int rd, bit recv = 0);
    instr_t i;
    i = i_nop();
    i.op = op; i.alusrc = src; i.rs = 8'(rs); i.csel = 8'(csel);
    i.enacc = enacc; i.regwe = regwe; i.rd = 8'(rd); i.recv = recv;
    return i;
  endfunction

  function automatic instr_t i_send(int rs, dir_e d);
    instr_t i;
    i = i_nop();
    i.send = 1; i.rs = 8'(rs); i.dir = d;
    return i;
  endfunction

  function automatic instr_t i_recv(int rd);
    instr_t i;
    i = i_nop();
    i.recv = 1; i.regwe = 1; i.regsrc = 1; i.rd = 8'(rd);
    return i;
  endfunction

  function automatic instr_t i_wait();
    instr_t i;
    i = i_nop();
    i.pcsrc = PC_WAIT;
    return i;
  endfunction

  function automatic instr_t i_jump(int addr);
    instr_t i;
    i = i_nop();
    i.pcsrc = PC_JUMP; i.jaddr = 8'(addr);
    return i;
  endfunction

  // rows (or columns) held by processor idx of n, relative to its own
  function automatic void held(int idx, int n, ref int lst[$]);
    lst.delete();
    if (idx == 0) lst.push_back(-1);
    lst.push_back(0);
    if (idx == n - 1) lst.push_back(1);
  endfunction

  function automatic int find(int lst[$], int v);
    foreach (lst[k]) if (lst[k] == v) return k;
    return -1;
  endfunction

  // 3 x 3 dot product for processor (i,j)
  function automatic void gen_dot3(int i, int j, int nh, int nw, ref instr_t prog[$]);
    int hr[$], hc[$];
    int k, west0, east0, tmp, nrmax, centre;
    prog.delete();
    held(i, nh, hr);
    held(j, nw, hc);
    k = hr.size() * hc.size();
    west0 = k; east0 = k + 3; tmp = k + 6;
    nrmax = (nh == 1) ? 3 : 2;
    centre = find(hr, 0) * hc.size() + find(hc, 0);
    // Phase 1: horizontal exchange of the own column, one held row at a time
    for (int p = 0; p < nrmax; p++) begin
      bit has = p < hr.size();
      int own = p * hc.size() + find(hc, 0);
      prog.push_back((has && j < nw - 1) ? i_send(own, DIR_E) : i_nop());
      prog.push_back((has && j > 0)      ? i_send(own, DIR_W) : i_nop());
      prog.push_back(i_nop());
      prog.push_back(i_nop());
      prog.push_back((has && j < nw - 1) ? i_recv(east0 + p) : i_nop());
      prog.push_back((has && j > 0)      ? i_recv(west0 + p) : i_nop());
    end
    // Phase 2a: partial sums for the north (kernel row +1) and south (row -1)
    for (int s = 0; s < 2; s++) begin
      int dy = (s == 0) ? 1 : -1;
      bit need = (s == 0) ? (i > 0) : (i < nh - 1);
      int rowp = find(hr, 0);
      for (int dx = -1; dx <= 1; dx++) begin
        int src = xreg(hr, hc, rowp, dx, west0, east0);
        if (!need) prog.push_back(i_nop());
        else prog.push_back(i_alu((dx == -1) ? OP_MUL : OP_MAC, AS_REG_CONST, src,
                                  (dy + 1) * 3 + dx + 1, 1, dx == 1, tmp));
      end
      prog.push_back(need ? i_send(tmp, (s == 0) ? DIR_N : DIR_S) : i_nop());
    end
    // Phase 2b: own result, kernel row 0 first, then -1 and +1
    for (int t = 0; t < 3; t++) begin
      int dy = (t == 0) ? 0 : (t == 1) ? -1 : 1;
      int rowp = find(hr, dy);
      if (rowp >= 0) begin
        for (int dx = -1; dx <= 1; dx++)
          prog.push_back(i_alu((t == 0 && dx == -1) ? OP_MUL : OP_MAC, AS_REG_CONST,
                               xreg(hr, hc, rowp, dx, west0, east0), (dy + 1) * 3 + dx + 1, 1, 0, 0));
      end else begin
        prog.push_back(i_alu(OP_ADD, AS_PORT_ACC, 0, 0, 1, 0, 0, 1));
        prog.push_back(i_nop());
        prog.push_back(i_nop());
      end
    end
    prog.push_back(i_alu(OP_PASSB, AS_REG_ACC, 0, 0, 0, 1, centre));
    prog.push_back(i_wait());
  endfunction

  // register holding pixel (held row index rowp, column offset dx)
  function automatic int xreg(int hr[$], int hc[$], int rowp, int dx, int west0, int east0);
    int c = find(hc, dx);
    if (c >= 0) return rowp * hc.size() + c;
    return (dx < 0) ? west0 + rowp : east0 + rowp;
  endfunction

  // point operation for processor (i,j): y = (x * c9) >>> c10
  function automatic void gen_point(int i, int j, int nh, int nw, ref instr_t prog[$]);
    int hr[$], hc[$];
    int k, centre;
    prog.delete();
    held(i, nh, hr);
    held(j, nw, hc);
    k = hr.size() * hc.size();
    centre = find(hr, 0) * hc.size() + find(hc, 0);
    prog.push_back(i_alu(OP_MUL, AS_REG_CONST, centre, 9, 0, 1, k + 6));
    prog.push_back(i_alu(OP_SHR, AS_REG_CONST, k + 6, 10, 0, 1, centre));
    prog.push_back(i_wait());
  endfunction

  // ---------------------------------------------------------------------
  // (2r+1) x (2r+1) dot product for any r >= 1 (arrays of at least 2 x 2):
  //   y(i,j) = sum over dy,dx in -r..r of c[(dy+r)*(2r+1)+(dx+r)] * x(i+dy, j+dx)
  // Pixels and partial sums travel several hops, relayed by the processors
  // in between. Register map of processor (i,j), k = FIFO-bound registers:
  //   k .. k+2r        row buffer, pixel at column offset dx in k+r+dx
  //   y0 = k+2r+1      own result being accumulated
  //   y0+s, y0+r+s     own parts of the northward / southward sums of round s
  //   y0+2r+1 ..+4     outgoing north, outgoing south, received from north,
  //                    received from south
  // Phases, in lock step on every processor (short phases padded with NOPs):
  //   H(p,s)  row slot p (p-th row the processor holds), round s = 1..r:
  //           send the pixel at offset -(s-1) east and +(s-1) west, receive
  //           offsets +s (from east) and -s (from west).
  //   C(p)    weighted row sums of that row: S(rho,d) = sum_dx c[d][dx] x(rho,dx)
  //           for every target that needs it.
  //   V(s)    vertical relay: X(s) = own part + X received in round s-1 goes
  //           north; Y(s) likewise goes south. After r rounds the value from
  //           the south is sum_{d=1..r} S_{i+d}(0,d); from the north likewise.
  //   end     y = own + from north + from south, written to the centre register.
  // A processor on the bottom edge holds rows 0..r itself and builds its
  // northward parts from them directly (the top edge likewise southward).
  function automatic void cgen_row(int i, int j, int nh, int nw, int r, int p,
                                   ref bit init[], ref instr_t q[$]);
    int hr[$], hc[$];
    int k, rho, y0, nt;
    int tgt[$], dd[$];
    held_r(i, nh, r, hr);
    held_r(j, nw, r, hc);
    q.delete();
    if (p >= hr.size()) return;
    k = hr.size() * hc.size();
    y0 = k + 2 * r + 1;
    rho = hr[p];
    tgt.push_back(y0); dd.push_back(rho);
    for (int s = 1; s <= r; s++) begin
      if (i > 0) begin
        if (i == nh - 1) begin
          if (rho >= 0 && rho <= s - 1) begin tgt.push_back(y0 + s); dd.push_back(r - s + 1 + rho); end
        end else if (rho == 0) begin tgt.push_back(y0 + s); dd.push_back(r - s + 1); end
      end
      if (i < nh - 1) begin
        if (i == 0) begin
          if (rho <= 0 && -rho <= s - 1) begin tgt.push_back(y0 + r + s); dd.push_back(-(r - s + 1 - rho)); end
        end else if (rho == 0) begin tgt.push_back(y0 + r + s); dd.push_back(-(r - s + 1)); end
      end
    end
    foreach (tgt[t]) begin
      int T = tgt[t] - k;
      if (init[T]) q.push_back(i_alu(OP_PASSA, AS_REG_CONST, tgt[t], 0, 1, 0, 0));
      for (int dx = -r; dx <= r; dx++) begin
        int c = find(hc, dx);
        int src = (c >= 0) ? p * hc.size() + c : k + r + dx;
        alu_op_e op = (!init[T] && dx == -r) ? OP_MUL : OP_MAC;
        q.push_back(i_alu(op, AS_REG_CONST, src, (dd[t] + r) * (2 * r + 1) + dx + r, 1, dx == r, tgt[t]));
      end
      init[T] = 1;
    end
  endfunction

  function automatic void held_r(int idx, int n, int r, ref int lst[$]);
    lst.delete();
    if (idx == 0) for (int o = -r; o < 0; o++) lst.push_back(o);
    lst.push_back(0);
    if (idx == n - 1) for (int o = 1; o <= r; o++) lst.push_back(o);
  endfunction

  function automatic void gen_dotr(int i, int j, int nh, int nw, int r, ref instr_t prog[$]);
    int hr[$], hc[$];
    int k, y0, xs, ys, rn, rs, centre, nmax;
    bit init[], init2[];
    instr_t q[$];
    int clen[];
    prog.delete();
    held_r(i, nh, r, hr);
    held_r(j, nw, r, hc);
    k = hr.size() * hc.size();
    y0 = k + 2 * r + 1;
    xs = y0 + 2 * r + 1; ys = xs + 1; rn = xs + 2; rs = xs + 3;
    centre = find(hr, 0) * hc.size() + find(hc, 0);
    // longest C(p) over all processors, for padding
    clen = new[r + 1];
    foreach (clen[p]) clen[p] = 0;
    for (int i2 = 0; i2 < nh; i2++)
      for (int j2 = 0; j2 < nw; j2++) begin
        init2 = new[4 * r + 6];
        foreach (init2[t]) init2[t] = 0;
        for (int p = 0; p <= r; p++) begin
          cgen_row(i2, j2, nh, nw, r, p, init2, q);
          if (q.size() > clen[p]) clen[p] = q.size();
        end
      end
    init = new[4 * r + 6];
    foreach (init[t]) init[t] = 0;
    for (int p = 0; p <= r; p++) begin
      bit has = p < hr.size();
      for (int s = 1; s <= r; s++) begin
        int ce = find(hc, -(s - 1)), cw = find(hc, s - 1);
        int se = (ce >= 0) ? p * hc.size() + ce : k + r - (s - 1);
        int sw = (cw >= 0) ? p * hc.size() + cw : k + r + (s - 1);
        prog.push_back((has && j < nw - 1) ? i_send(se, DIR_E) : i_nop());
        prog.push_back((has && j > 0)      ? i_send(sw, DIR_W) : i_nop());
        prog.push_back(i_nop());
        prog.push_back(i_nop());
        prog.push_back((has && j < nw - 1) ? i_recv(k + r + s) : i_nop());
        prog.push_back((has && j > 0)      ? i_recv(k + r - s) : i_nop());
      end
      cgen_row(i, j, nh, nw, r, p, init, q);
      foreach (q[a]) prog.push_back(q[a]);
      for (int a = q.size(); a < clen[p]; a++) prog.push_back(i_nop());
    end
    for (int s = 1; s <= r; s++) begin
      bit relay_n = i > 0 && s > 1 && i < nh - 1;
      bit relay_s = i < nh - 1 && s > 1 && i > 0;
      prog.push_back(relay_n ? i_alu(OP_PASSA, AS_REG_CONST, rs, 0, 1, 0, 0) : i_nop());
      prog.push_back(relay_n ? i_alu(OP_ADD, AS_REG_ACC, y0 + s, 0, 0, 1, xs) : i_nop());
      prog.push_back(relay_s ? i_alu(OP_PASSA, AS_REG_CONST, rn, 0, 1, 0, 0) : i_nop());
      prog.push_back(relay_s ? i_alu(OP_ADD, AS_REG_ACC, y0 + r + s, 0, 0, 1, ys) : i_nop());
      prog.push_back((i > 0)      ? i_send(relay_n ? xs : y0 + s, DIR_N) : i_nop());
      prog.push_back((i < nh - 1) ? i_send(relay_s ? ys : y0 + r + s, DIR_S) : i_nop());
      prog.push_back(i_nop());
      prog.push_back(i_nop());
      prog.push_back((i > 0)      ? i_recv(rn) : i_nop());
      prog.push_back((i < nh - 1) ? i_recv(rs) : i_nop());
    end
    prog.push_back(i_alu(OP_PASSA, AS_REG_CONST, y0, 0, 1, 0, 0));
    if (i > 0)      prog.push_back(i_alu(OP_ADD, AS_REG_ACC, rn, 0, 1, 0, 0));
    if (i < nh - 1) prog.push_back(i_alu(OP_ADD, AS_REG_ACC, rs, 0, 1, 0, 0));
    prog.push_back(i_alu(OP_PASSB, AS_REG_ACC, 0, 0, 0, 1, centre));
    prog.push_back(i_wait());
  endfunction

endpackage
