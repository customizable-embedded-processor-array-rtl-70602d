// tb_cpama_tiff2bw: colour-to-grey conversion (TIFF2BW) on the device.
//
// The document compares a 4 x 4 array of 32-bit processors on this point
// operation (a 1520 x 1496 image in 1.71 million cycles). A point operation
// needs no neighbouring pixels, so the device is configured with r = 0, and
// the three colour planes travel as three arguments of every pixel (A = 3).
// Two pixels enter per cycle (BW = 2); with r = 0, BW = 2 and a program of up
// to 9 cycles the block time is 12 cycles, and 380 x 374 blocks give the
// document's 1.71 M cycles. That reading of the figure is this design's; the
// program below takes 6 cycles, so here a block takes CT + 3 = 16/2 + 3 = 11.
//
// Each processor computes grey = (28 R + 59 G + 11 B) / 100, the weighting of
// the usual TIFF-to-black-and-white converter, with the division done as a
// multiplication by 5243 and an arithmetic shift by 19 (exact for the 0..25500
// range). The testbench fills an 18 x 10 RGB image (partial blocks on the
// right and bottom), runs the device, compares every grey pixel with an
// integer division done here, checks the block time between successive
// GC_LOAD commands, and prints the cycle count the 1520 x 1496 image needs at
// this block time.
module tb_cpama_tiff2bw;
  import cpama_pkg::*;
  import cpama_prog_pkg::*;
  localparam int unsigned NW = 4, NH = 4, R = 0, W = 32, A = 3, BW = 2, MAW = 24, NCOMP = 8;
  localparam int unsigned RW = $clog2(A + NCOMP), CW = 4, AW = 6, ABITS = 1;
  localparam int IMW = 18, IMH = 10, PLANE = 1024, OUTB = 8192;
  localparam int CT = (NW + 2 * R) * (NH + 2 * R) / BW, HS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, prog_we, prog_sel, conflict_any;
  logic [15:0] img_w, img_h;
  logic [MAW-1:0] in_base, out_base, plane_stride;
  logic [AW-1:0] ext_addr;
  logic [3:0] prog_node;
  logic [5:0] prog_addr;
  logic [$bits(dut.prog_data)-1:0] prog_data;
  logic [BW-1:0][A-1:0] rd_en;
  logic [BW-1:0][A-1:0][MAW-1:0] rd_addr;
  logic [BW-1:0][A-1:0][W-1:0] rd_data;
  logic [BW-1:0] wr_en;
  logic [BW-1:0][MAW-1:0] wr_addr;
  logic [BW-1:0][W-1:0] wr_data;
  gctrl_e gctrl;
  logic [31:0] blocks, wait_cycles;

  cpama_top #(.NW(NW), .NH(NH), .R(R), .W(W), .A(A), .BW(BW), .NCOMP(NCOMP), .MAW(MAW)) dut (.*);

  // behavioural image memory: BW x A read lanes, BW write lanes, 1-cycle reads
  logic [W-1:0] mem [16384];
  always_ff @(posedge clk) begin
    for (int l = 0; l < BW; l++) begin
      for (int a = 0; a < A; a++)
        if (rd_en[l][a]) rd_data[l][a] <= mem[14'(rd_addr[l][a])];
      if (wr_en[l]) mem[14'(wr_addr[l])] <= wr_data[l];
    end
  end

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

  int last_load = -1, cyc = 0, bt_bad = 0, bt_seen = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (gctrl == GC_LOAD) begin
      if (last_load >= 0 && dut.u_mmu.busy) begin
        bt_seen++;
        if (cyc - last_load != CT + HS) bt_bad++;
      end
      last_load = cyc;
    end
  end

  function automatic int chan(int y, int x, int a);
    return (y * 37 + x * 91 + a * 53 + ((x * y) % 7) * 11) % 256;
  endfunction

  task automatic load_word(int node, bit sel, int addr, logic [63:0] data);
    @(negedge clk);
    prog_we = 1; prog_node = 4'(node); prog_sel = sel; prog_addr = 6'(addr);
    prog_data = $bits(prog_data)'(data);
    @(negedge clk);
    prog_we = 0;
  endtask

  initial begin
    logic [W-1:0] c [5];
    instr_t prog[$];
    int t0, t1, nb;
    longint big;
    start = 0; prog_we = 0; prog_sel = 0; prog_node = 0; prog_addr = 0; prog_data = 0;
    img_w = 16'(IMW); img_h = 16'(IMH); in_base = 0; out_base = MAW'(OUTB);
    plane_stride = MAW'(PLANE); ext_addr = 0;
    for (int a = 0; a < 16384; a++) mem[a] = 32'hBAD0BAD0;
    for (int y = 0; y < IMH; y++)
      for (int x = 0; x < IMW; x++)
        for (int a = 0; a < A; a++) mem[a * PLANE + y * IMW + x] = W'(chan(y, x, a));
    c[0] = 28; c[1] = 59; c[2] = 11; c[3] = 5243; c[4] = 19;
    // registers: 0..2 = R, G, B of the pixel (FIFO-bound, result into 0); 3 = temporary
    prog.delete();
    prog.push_back(i_alu(OP_MUL, AS_REG_CONST, 0, 0, 1, 0, 0));
    prog.push_back(i_alu(OP_MAC, AS_REG_CONST, 1, 1, 1, 0, 0));
    prog.push_back(i_alu(OP_MAC, AS_REG_CONST, 2, 2, 1, 1, 3));
    prog.push_back(i_alu(OP_MUL, AS_REG_CONST, 3, 3, 0, 1, 3));
    prog.push_back(i_alu(OP_SHR, AS_REG_CONST, 3, 4, 0, 1, 0));
    prog.push_back(i_wait());
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NW * NH; n++) begin
      foreach (prog[a]) load_word(n, 0, a, instr_pack(prog[a], RW, CW, AW, ABITS));
      for (int k = 0; k < 5; k++) load_word(n, 1, k, 64'(c[k]));
    end

    nb = ((IMW + NW - 1) / NW) * ((IMH + NH - 1) / NH);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    t1 = cyc;
    for (int y = 0; y < IMH; y++)
      for (int x = 0; x < IMW; x++) begin
        int g;
        g = (28 * chan(y, x, 0) + 59 * chan(y, x, 1) + 11 * chan(y, x, 2)) / 100;
        chk(mem[OUTB + y * IMW + x] == W'(g),
            $sformatf("grey (%0d,%0d) got %0d exp %0d", y, x, mem[OUTB + y * IMW + x], g));
      end
    chk(blocks == 32'(nb + 2), $sformatf("blocks %0d", blocks));
    chk(bt_seen >= nb && bt_bad == 0, $sformatf("block time: %0d of %0d not %0d cycles", bt_bad, bt_seen, CT + HS));
    chk(wait_cycles == 0, "communication bound: no processor waits");
    big = longint'((1520 / NW) * (1496 / NH)) * (CT + HS);
    $display("%0d blocks in %0d cycles; a 1520 x 1496 image takes %0d cycles at %0d per block",
             nb, t1 - t0, big, CT + HS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
