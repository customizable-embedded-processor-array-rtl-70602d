// tb_cpama_array: self-checking test of the processor array.
//
// Part 1 (4 x 4 array, r = 2): one block of 8 x 8 distinct pixels is shifted
// in and exchanged into the registers; every register of every processor is
// compared with the pixel-allocation table of the design (corner processors
// hold R0..R8, edge processors R0..R2, middle processors R0).
// Part 2 (4 x 4 array, r = 1): the 3 x 3 dot-product programs are loaded, five
// blocks (three random, two flush) stream through while the testbench acts as
// global controller, and each result block, leaving two blocks later, is
// compared with the dot product computed here from the input pixels.
module tb_cpama_array;
  import cpama_pkg::*;
  import cpama_prog_pkg::*;
  localparam int unsigned W = 32, NW = 4, NH = 4, IDEPTH = 64, CDEPTH = 16, NCOMP = 8;
  localparam int unsigned R1 = 1, WR1 = NW + 2, HR1 = NH + 2;
  localparam int unsigned R2 = 2, WR2 = NW + 4, HR2 = NH + 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instance with r = 2 (allocation check) ----------------
  logic v2, rv2, ov2, sh2, ad2, cf2;
  logic [0:0][0:0][W-1:0] p2, o2;
  gctrl_e g2;
  cpama_array #(.NW(NW), .NH(NH), .R(R2), .W(W)) dut2 (
    .clk, .rst_n, .in_valid(v2), .in_pix(p2), .row_valid(rv2), .out_valid(ov2), .out_pix(o2),
    .fifo_shift(sh2), .gctrl(g2), .ext_addr('0), .all_done(ad2), .conflict_any(cf2),
    .prog_we(1'b0), .prog_node('0), .prog_sel(1'b0), .prog_addr('0), .prog_data('0));
  assign sh2 = rv2;

  // Register index of each pixel of an 8 x 8 block (r = 2 on 4 x 4)
  localparam int REGMAP [8][8] = '{
    '{0,1,2,0,0,0,1,2}, '{3,4,5,1,1,3,4,5}, '{6,7,8,2,2,6,7,8}, '{0,1,2,0,0,0,1,2},
    '{0,1,2,0,0,0,1,2}, '{0,1,2,0,0,0,1,2}, '{3,4,5,1,1,3,4,5}, '{6,7,8,2,2,6,7,8}};
  localparam int OWNER [8] = '{0,0,0,1,2,3,3,3};

  function automatic logic [W-1:0] rdreg(int i, int j, int k);
    // hierarchical peek into processor (i,j)
    logic [W-1:0] v;
    v = 'x;
    case (i * 4 + j)
      0:  v = dut2.g_row[0].g_col[0].u_proc.u_rf.regs[k];
      1:  v = dut2.g_row[0].g_col[1].u_proc.u_rf.regs[k];
      2:  v = dut2.g_row[0].g_col[2].u_proc.u_rf.regs[k];
      3:  v = dut2.g_row[0].g_col[3].u_proc.u_rf.regs[k];
      4:  v = dut2.g_row[1].g_col[0].u_proc.u_rf.regs[k];
      5:  v = dut2.g_row[1].g_col[1].u_proc.u_rf.regs[k];
      6:  v = dut2.g_row[1].g_col[2].u_proc.u_rf.regs[k];
      7:  v = dut2.g_row[1].g_col[3].u_proc.u_rf.regs[k];
      8:  v = dut2.g_row[2].g_col[0].u_proc.u_rf.regs[k];
      9:  v = dut2.g_row[2].g_col[1].u_proc.u_rf.regs[k];
      10: v = dut2.g_row[2].g_col[2].u_proc.u_rf.regs[k];
      11: v = dut2.g_row[2].g_col[3].u_proc.u_rf.regs[k];
      12: v = dut2.g_row[3].g_col[0].u_proc.u_rf.regs[k];
      13: v = dut2.g_row[3].g_col[1].u_proc.u_rf.regs[k];
      14: v = dut2.g_row[3].g_col[2].u_proc.u_rf.regs[k];
      default: v = dut2.g_row[3].g_col[3].u_proc.u_rf.regs[k];
    endcase
    return v;
  endfunction

  // ---------------- instance with r = 1 (dot product) ----------------
  logic v1, rv1, ov1, sh1, ad1, cf1, pwe, psel;
  logic [0:0][0:0][W-1:0] p1, o1;
  gctrl_e g1;
  logic [3:0] pnode;
  logic [5:0] paddr;
  logic [63:0] pdata;
  cpama_array #(.NW(NW), .NH(NH), .R(R1), .W(W)) dut1 (
    .clk, .rst_n, .in_valid(v1), .in_pix(p1), .row_valid(rv1), .out_valid(ov1), .out_pix(o1),
    .fifo_shift(sh1), .gctrl(g1), .ext_addr('0), .all_done(ad1), .conflict_any(cf1),
    .prog_we(pwe), .prog_node(pnode), .prog_sel(psel), .prog_addr(paddr), .prog_data(pdata[$bits(dut1.prog_data)-1:0]));
  assign sh1 = rv1;

  logic [W-1:0] outq [$];
  always @(posedge clk) if (rst_n && ov1) outq.push_back(o1[0][0]);
  int conflicts = 0;
  always @(posedge clk) if (rst_n && cf1) conflicts++;

  localparam int unsigned RW1 = $clog2(4 + NCOMP);

  initial begin
    logic [W-1:0] blk [5][HR1][WR1];
    logic [W-1:0] c [9];
    instr_t prog[$];
    v1 = 0; v2 = 0; p1 = '0; p2 = '0; g1 = GC_NONE; g2 = GC_NONE;
    pwe = 0; psel = 0; pnode = 0; paddr = 0; pdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- part 1: allocation with r = 2 ----
    for (int r = HR2 - 1; r >= 0; r--)
      for (int col = WR2 - 1; col >= 0; col--) begin
        @(negedge clk); v2 = 1; p2[0][0] = W'(r * 16 + col);
      end
    @(negedge clk); v2 = 0; g2 = GC_LOAD;
    @(negedge clk); g2 = GC_NONE;
    for (int r = 0; r < 8; r++)
      for (int col = 0; col < 8; col++)
        chk(rdreg(OWNER[r], OWNER[col], REGMAP[r][col]) == W'(r * 16 + col),
            $sformatf("pixel (%0d,%0d) in P%0d%0d R%0d", r, col, OWNER[r] + 1, OWNER[col] + 1, REGMAP[r][col]));

    // ---- part 2: dot product with r = 1 ----
    for (int n = 0; n < 9; n++) c[n] = W'($signed($urandom_range(0, 8)) - 4);
    for (int i = 0; i < NH; i++)
      for (int j = 0; j < NW; j++) begin
        gen_dot3(i, j, NH, NW, prog);
        foreach (prog[a]) begin
          @(negedge clk); pwe = 1; psel = 0; pnode = 4'(i * NW + j); paddr = 6'(a);
          pdata = instr_pack(prog[a], RW1, 4, 6, 1);
        end
        for (int n = 0; n < 9; n++) begin
          @(negedge clk); pwe = 1; psel = 1; paddr = 6'(n); pdata = 64'(c[n]);
        end
      end
    @(negedge clk); pwe = 0;
    for (int b = 0; b < 5; b++)
      for (int r = 0; r < HR1; r++)
        for (int col = 0; col < WR1; col++)
          blk[b][r][col] = (b < 3) ? W'($urandom_range(0, 255)) : '0;
    for (int b = 0; b < 5; b++) begin
      for (int r = HR1 - 1; r >= 0; r--)
        for (int col = WR1 - 1; col >= 0; col--) begin
          @(negedge clk); v1 = 1; p1[0][0] = blk[b][r][col];
        end
      @(negedge clk); v1 = 0;
      while (!ad1) @(negedge clk);
      g1 = GC_LOAD;
      @(negedge clk); g1 = GC_START;
      @(negedge clk); g1 = GC_NONE;
    end
    repeat (5) @(negedge clk);
    chk(outq.size() == 5 * HR1 * WR1, $sformatf("output count %0d", outq.size()));
    for (int b = 0; b < 3; b++)
      for (int s = 0; s < HR1 * WR1; s++) begin
        int r, col;
        r = HR1 - 1 - s / WR1;
        col = WR1 - 1 - s % WR1;
        if (r >= R1 && r < R1 + NH && col >= R1 && col < R1 + NW) begin
          logic [W-1:0] y;
          y = '0;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              y += c[(dy + 1) * 3 + dx + 1] * blk[b][r + dy][col + dx];
          chk(outq[(b + 2) * HR1 * WR1 + s] == y,
              $sformatf("block %0d pixel (%0d,%0d) got %0d exp %0d", b, r, col,
                        $signed(outq[(b + 2) * HR1 * WR1 + s]), $signed(y)));
        end
      end
    chk(conflicts > 0, "priority arbitration exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
