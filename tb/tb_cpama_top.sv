// tb_cpama_top: end-to-end test of the compute device at its default sizes
// (4 x 4 array, 32-bit words, r = 1, one pixel per cycle).
//
// A behavioural image memory and a host sequence surround the device. The host
// loads two programs into every processor: the 3 x 3 dot product at address 0
// and a point operation y = (x * c9) >>> c10 at address 32. Run 1 filters a
// 14 x 10 image with the dot product (blocks at the right and bottom borders
// are partial; pixels outside the image count as 0). Run 2 switches program by
// giving the external start address 32 and applies the point operation to the
// same image. Both output images are compared with values computed here.
//
// Timing: with the dot product shorter than the communication time, every
// block must take CT + HS = (4+2)(4+2)/1 + 3 = 39 cycles, checked between
// successive GC_LOAD commands. Mechanisms counted (each must occur): FIFO
// exchange commands, external-address starts, router priority conflicts,
// non-real (zero) neighbouring pixels, result pixels streaming out while the
// next block streams in, and the program switch.
module tb_cpama_top;
  import cpama_pkg::*;
  import cpama_prog_pkg::*;
  localparam int unsigned NW = 4, NH = 4, R = 1, W = 32, MAW = 24, NCOMP = 8;
  localparam int unsigned RW = $clog2(4 + NCOMP), CW = 4, AW = 6, ABITS = 1;
  localparam int IMW = 14, IMH = 10, IN_BASE = 0, OUT1 = 4096, OUT2 = 8192;
  localparam int CT = (NW + 2 * R) * (NH + 2 * R), HS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, prog_we, prog_sel, conflict_any;
  logic [15:0] img_w, img_h;
  logic [MAW-1:0] in_base, out_base, plane_stride;
  logic [AW-1:0] ext_addr;
  logic [3:0] prog_node;
  logic [5:0] prog_addr;
  logic [$bits(cpama_top_dut.prog_data)-1:0] prog_data;
  logic [0:0][0:0] rd_en;
  logic [0:0][0:0][MAW-1:0] rd_addr;
  logic [0:0][0:0][W-1:0] rd_data;
  logic [0:0] wr_en;
  logic [0:0][MAW-1:0] wr_addr;
  logic [0:0][W-1:0] wr_data;
  gctrl_e gctrl;
  logic [31:0] blocks, wait_cycles;

  cpama_top cpama_top_dut (.*);

  // behavioural image memory, one-cycle read latency
  logic [W-1:0] mem [16384];
  always_ff @(posedge clk) begin
    if (rd_en[0][0]) rd_data[0][0] <= mem[14'(rd_addr[0][0])];
    if (wr_en[0]) mem[14'(wr_addr[0])] <= wr_data[0];
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_load = 0, n_start = 0, n_conflict = 0, n_pad = 0, n_overlap = 0;
  int last_load = -1, cyc = 0, bt_bad = 0, bt_seen = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (gctrl == GC_LOAD) begin
      if (last_load >= 0 && cpama_top_dut.u_mmu.busy) begin
        bt_seen++;
        if (cyc - last_load != CT + HS) bt_bad++;
      end
      last_load = cyc;
      n_load++;
    end
    if (gctrl == GC_START) n_start++;
    if (conflict_any) n_conflict++;
    if (cpama_top_dut.u_mmu.issue && !cpama_top_dut.u_mmu.lane_ok[0] &&
        cpama_top_dut.u_mmu.flush == 2'd0) n_pad++;
    if (cpama_top_dut.in_valid && cpama_top_dut.res_valid) n_overlap++;
  end

  function automatic logic [W-1:0] img(int y, int x);
    if (y < 0 || y >= IMH || x < 0 || x >= IMW) return '0;
    return W'((y * 29 + x * 13 + 7) % 256);
  endfunction

  task automatic load_word(int node, bit sel, int addr, logic [63:0] data);
    @(negedge clk);
    prog_we = 1; prog_node = 4'(node); prog_sel = sel; prog_addr = 6'(addr);
    prog_data = $bits(prog_data)'(data);
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic run(int entry, int out);
    @(negedge clk);
    ext_addr = AW'(entry); out_base = MAW'(out); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    logic [W-1:0] c [11];
    instr_t prog[$];
    int t0, t1, nb;
    start = 0; prog_we = 0; prog_sel = 0; prog_node = 0; prog_addr = 0; prog_data = 0;
    img_w = 16'(IMW); img_h = 16'(IMH); in_base = MAW'(IN_BASE); out_base = 0; plane_stride = 0;
    ext_addr = 0;
    for (int a = 0; a < 16384; a++) mem[a] = 32'hBAD0BAD0;
    for (int y = 0; y < IMH; y++) for (int x = 0; x < IMW; x++) mem[IN_BASE + y * IMW + x] = img(y, x);
    for (int n = 0; n < 9; n++) c[n] = W'($signed($urandom_range(0, 10)) - 5);
    c[9] = 77; c[10] = 3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NH; i++)
      for (int j = 0; j < NW; j++) begin
        gen_dot3(i, j, NH, NW, prog);
        foreach (prog[a]) load_word(i * NW + j, 0, a, instr_pack(prog[a], RW, CW, AW, ABITS));
        gen_point(i, j, NH, NW, prog);
        foreach (prog[a]) load_word(i * NW + j, 0, 32 + a, instr_pack(prog[a], RW, CW, AW, ABITS));
        for (int n = 0; n < 11; n++) load_word(i * NW + j, 1, n, 64'(c[n]));
      end

    nb = ((IMW + NW - 1) / NW) * ((IMH + NH - 1) / NH);
    t0 = cyc;
    run(0, OUT1);
    t1 = cyc;
    for (int y = 0; y < IMH; y++)
      for (int x = 0; x < IMW; x++) begin
        logic [W-1:0] yv;
        yv = '0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            yv += c[(dy + 1) * 3 + dx + 1] * img(y + dy, x + dx);
        chk(mem[OUT1 + y * IMW + x] == yv,
            $sformatf("dot3 (%0d,%0d) got %0d exp %0d", y, x, $signed(mem[OUT1 + y * IMW + x]), $signed(yv)));
      end
    chk(blocks == 32'(nb + 2), $sformatf("blocks %0d", blocks));
    chk(bt_seen >= nb && bt_bad == 0, $sformatf("block time CT+HS: %0d of %0d wrong", bt_bad, bt_seen));
    $display("run 1: %0d blocks (+2 flush) in %0d cycles", nb, t1 - t0);

    run(32, OUT2);
    for (int y = 0; y < IMH; y++)
      for (int x = 0; x < IMW; x++)
        chk(mem[OUT2 + y * IMW + x] == W'($signed(img(y, x) * c[9]) >>> c[10]),
            $sformatf("point (%0d,%0d)", y, x));

    $display("loads=%0d starts=%0d conflicts=%0d pads=%0d overlap=%0d waits=%0d",
             n_load, n_start, n_conflict, n_pad, n_overlap, wait_cycles);
    chk(n_load > 0, "FIFO exchange (GC_LOAD) happened");
    chk(n_start > 0, "external-address start (GC_START) happened");
    chk(n_conflict > 0, "router priority arbitration happened");
    chk(n_pad > 0, "non-real neighbouring pixels were padded");
    chk(n_overlap > 0, "results streamed out while a block streamed in");
    chk(n_start == 2 * (nb + 2), "program switch: both runs started every block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
