// cpama_dot_run: test harness that runs the dot product on one device size.
//
// Instantiates cpama_top at NW x NH with neighbourhood depth R, surrounds it
// with a behavioural image memory and a host sequence, and filters an
// (2*NW+3) x (NH+3) image with a (2R+1) x (2R+1) kernel, so that blocks at the
// right and bottom borders are partial. R = 1 uses the 3 x 3 program with the
// default register and memory sizes; larger R uses the general program, which
// needs NCOMP = 16 working registers, 128 instruction and 32 constant words.
// Every output pixel is compared with a sum computed here. The time between
// successive GC_LOAD commands must be the same for every block, and equal to
// CT + 3 = (NW+2R)(NH+2R) + 3 cycles when the program is shorter than CT.
// Reports through its ports: fin rises when the run is over; checks and
// failures count the comparisons. Used by tb_cpama_dot_sizes, which runs
// several sizes side by side.
module cpama_dot_run
  import cpama_pkg::*;
  import cpama_prog_pkg::*;
#(
  parameter int unsigned NW = 2,
  parameter int unsigned NH = 8,
  parameter int unsigned R  = 1
) (
  input  logic clk,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int unsigned W = 32, MAW = 24;
  localparam int unsigned NCOMP = (R == 1) ? 8 : 16, IDEPTH = (R == 1) ? 64 : 128;
  localparam int unsigned CDEPTH = (R == 1) ? 16 : 32, NC = (2 * R + 1) * (2 * R + 1);
  localparam int unsigned RW = $clog2((R + 1) * (R + 1) + NCOMP), CW = $clog2(CDEPTH);
  localparam int unsigned AW = $clog2(IDEPTH), ABITS = 1, PAW = (AW > CW) ? AW : CW;
  localparam int unsigned NDW = $clog2(NW * NH);
  localparam int IMW = 2 * NW + 3, IMH = NH + 3, OUTB = 8192;
  localparam int CT = (NW + 2 * R) * (NH + 2 * R), HS = 3;

  logic rst_n = 0;
  logic start, busy, done, prog_we, prog_sel, conflict_any;
  logic [15:0] img_w, img_h;
  logic [MAW-1:0] in_base, out_base, plane_stride;
  logic [AW-1:0] ext_addr;
  logic [NDW-1:0] prog_node;
  logic [PAW-1:0] prog_addr;
  logic [$bits(dut.prog_data)-1:0] prog_data;
  logic [0:0][0:0] rd_en;
  logic [0:0][0:0][MAW-1:0] rd_addr;
  logic [0:0][0:0][W-1:0] rd_data;
  logic [0:0] wr_en;
  logic [0:0][MAW-1:0] wr_addr;
  logic [0:0][W-1:0] wr_data;
  gctrl_e gctrl;
  logic [31:0] blocks, wait_cycles;

  cpama_top #(.NW(NW), .NH(NH), .R(R), .NCOMP(NCOMP), .IDEPTH(IDEPTH), .CDEPTH(CDEPTH))
    dut (.*);

  logic [W-1:0] mem [16384];
  always_ff @(posedge clk) begin
    if (rd_en[0][0]) rd_data[0][0] <= mem[14'(rd_addr[0][0])];
    if (wr_en[0]) mem[14'(wr_addr[0])] <= wr_data[0];
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0dx%0d r=%0d %s", NW, NH, R, what); end
  endtask

  int last_load = -1, cyc = 0, bt_bad = 0, bt_seen = 0, bt = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (gctrl == GC_LOAD) begin
      if (last_load >= 0 && dut.u_mmu.busy) begin
        bt_seen++;
        if (bt == 0) bt = cyc - last_load;
        if (cyc - last_load != bt || bt < CT + HS || (R == 1 && bt != CT + HS)) bt_bad++;
      end
      last_load = cyc;
    end
  end

  function automatic logic [W-1:0] img(int y, int x);
    if (y < 0 || y >= IMH || x < 0 || x >= IMW) return '0;
    return W'((y * 31 + x * 17 + 3) % 200);
  endfunction

  task automatic load_word(int node, bit sel, int addr, logic [63:0] data);
    @(negedge clk);
    prog_we = 1; prog_node = NDW'(node); prog_sel = sel; prog_addr = PAW'(addr);
    prog_data = $bits(prog_data)'(data);
    @(negedge clk);
    prog_we = 0;
  endtask

  initial begin
    logic [W-1:0] c [NC];
    instr_t prog[$];
    int t0, t1, nb;
    fin = 0; checks = 0; failures = 0;
    start = 0; prog_we = 0; prog_sel = 0; prog_node = 0; prog_addr = 0; prog_data = 0;
    img_w = 16'(IMW); img_h = 16'(IMH); in_base = 0; out_base = MAW'(OUTB);
    plane_stride = 0; ext_addr = 0;
    for (int a = 0; a < 16384; a++) mem[a] = 32'hBAD0BAD0;
    for (int y = 0; y < IMH; y++) for (int x = 0; x < IMW; x++) mem[y * IMW + x] = img(y, x);
    for (int n = 0; n < NC; n++) c[n] = W'($signed($urandom_range(0, 12)) - 6);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NH; i++)
      for (int j = 0; j < NW; j++) begin
        if (R == 1) gen_dot3(i, j, NH, NW, prog);
        else gen_dotr(i, j, NH, NW, R, prog);
        if (prog.size() > IDEPTH) begin failures++; $display("program too long: %0d", prog.size()); end
        foreach (prog[a]) load_word(i * NW + j, 0, a, instr_pack(prog[a], RW, CW, AW, ABITS));
        for (int n = 0; n < NC; n++) load_word(i * NW + j, 1, n, 64'(c[n]));
      end
    nb = ((IMW + NW - 1) / NW) * ((IMH + NH - 1) / NH);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    t1 = cyc;
    for (int y = 0; y < IMH; y++)
      for (int x = 0; x < IMW; x++) begin
        logic [W-1:0] yv;
        yv = '0;
        for (int dy = -int'(R); dy <= int'(R); dy++)
          for (int dx = -int'(R); dx <= int'(R); dx++)
            yv += c[(dy + R) * (2 * R + 1) + dx + R] * img(y + dy, x + dx);
        chk(mem[OUTB + y * IMW + x] == yv, $sformatf("pixel (%0d,%0d)", y, x));
      end
    // the handshake of the second flush block may still be pending at 'done'
    // when the program is longer than CT
    chk(blocks == 32'(nb + 2) || (bt > CT + HS && blocks == 32'(nb + 1)), $sformatf("blocks %0d", blocks));
    chk(bt_seen >= nb && bt_bad == 0, $sformatf("block time: %0d of %0d differ (CT + 3 = %0d)", bt_bad, bt_seen, CT + HS));
    $display("%0dx%0d r=%0d: %0d blocks (+2 flush) in %0d cycles, %0d per block (CT + 3 = %0d)",
             NW, NH, R, nb, t1 - t0, bt, CT + HS);
    fin = 1;
  end
endmodule
