// tb_cpama_processor: self-checking test of one array processor.
// A middle processor (one FIFO register) gets a pixel X through its FIFO and
// GC_LOAD, is started with GC_START at an external address, and runs:
//   recv r1 | MUL r0*c0 ->ACC | MAC r1*c1 ->ACC,r2 | send r2 E |
//   ADD PortIn+ACC ->ACC (recv) | ACC -> r0 | JUMP over a poisoned slot | WAIT
// Packets arrive late, so both receives stall. Checked: the sent packet, the
// final result leaving through the FIFO after the next GC_LOAD, the cycle
// count from start to done, and that the poisoned slot never executes.
module tb_cpama_processor;
  import cpama_pkg::*;
  import cpama_prog_pkg::*;
  localparam int unsigned W = 32, RW = 4, IDEPTH = 64, CDEPTH = 16, ABITS = 1;
  localparam int unsigned AW = 6, CW = 4, IW = instr_width(RW, CW, AW, ABITS);
  localparam int unsigned BASE = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  gctrl_e gctrl;
  logic [AW-1:0] ext_addr;
  logic done, fifo_shift, send, pin_valid, pin_take, imem_we, cmem_we;
  logic [0:0][0:0][W-1:0] fifo_in, fifo_out;
  dir_e send_dir;
  logic [W-1:0] send_data, pin_data, cmem_wdata;
  logic [ABITS-1:0] send_arg;
  logic [AW-1:0] imem_addr;
  logic [IW-1:0] imem_wdata;
  logic [CW-1:0] cmem_addr;
  int checks = 0, failures = 0;

  cpama_processor #(.W(W), .A(1), .RH(1), .RC(1), .NCOMP(8), .RW(RW), .IDEPTH(IDEPTH),
                    .CDEPTH(CDEPTH), .ABITS(ABITS)) dut (.*);

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // packet capture
  logic [W-1:0] sent_data; dir_e sent_dir; int nsent = 0;
  always @(posedge clk) if (send) begin sent_data <= send_data; sent_dir <= send_dir; nsent++; end

  initial begin
    instr_t prog[$];
    logic [W-1:0] x, p1, p2, c0, c1, expect_mid, expect_res;
    int cyc;
    gctrl = GC_NONE; ext_addr = 0; fifo_shift = 0; fifo_in = '0; pin_valid = 0; pin_data = 0;
    imem_we = 0; cmem_we = 0; imem_addr = 0; imem_wdata = 0; cmem_addr = 0; cmem_wdata = 0;
    x = $urandom; p1 = $urandom; p2 = $urandom; c0 = $urandom_range(1, 1000); c1 = $urandom;
    expect_mid = x * c0 + p1 * c1;
    expect_res = expect_mid + p2;
    prog.push_back(i_recv(1));
    prog.push_back(i_alu(OP_MUL, AS_REG_CONST, 0, 0, 1, 0, 0));
    prog.push_back(i_alu(OP_MAC, AS_REG_CONST, 1, 1, 1, 1, 2));
    prog.push_back(i_send(2, DIR_E));
    prog.push_back(i_alu(OP_ADD, AS_PORT_ACC, 0, 0, 1, 0, 0, 1));
    prog.push_back(i_alu(OP_PASSB, AS_REG_ACC, 0, 0, 0, 1, 0));
    prog.push_back(i_jump(BASE + 8));
    prog.push_back(i_alu(OP_PASSA, AS_REG_CONST, 3, 0, 1, 1, 0));
    prog.push_back(i_wait());
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk(done, "waiting after reset");
    // load program at BASE and constants
    foreach (prog[n]) begin
      @(negedge clk);
      imem_we = 1; imem_addr = AW'(BASE + n); imem_wdata = IW'(instr_pack(prog[n], RW, CW, AW, ABITS));
    end
    @(negedge clk); imem_we = 0;
    cmem_we = 1; cmem_addr = 0; cmem_wdata = c0;
    @(negedge clk); cmem_addr = 1; cmem_wdata = c1;
    @(negedge clk); cmem_we = 0;
    // pixel through the FIFO, then exchange
    fifo_in[0][0] = x; fifo_shift = 1;
    @(negedge clk); fifo_shift = 0;
    gctrl = GC_LOAD;
    @(negedge clk); gctrl = GC_START; ext_addr = AW'(BASE);
    @(negedge clk); gctrl = GC_NONE;
    cyc = 1;
    chk(!done, "running after start");
    repeat (3) begin @(negedge clk); cyc++; end
    chk(!done && dut.pc == AW'(BASE), "stalled on first receive");
    pin_valid = 1; pin_data = p1;
    @(negedge clk); cyc++; pin_valid = 0;
    repeat (20) begin
      if (dut.pc == AW'(BASE + 4) && !pin_valid) begin
        repeat (2) begin @(negedge clk); cyc++; end
        chk(dut.pc == AW'(BASE + 4), "stalled on second receive");
        pin_valid = 1; pin_data = p2;
        @(negedge clk); cyc++; pin_valid = 0;
      end
      if (done) break;
      @(negedge clk); cyc++;
    end
    chk(done, "done");
    chk(nsent == 1 && sent_dir == DIR_E && sent_data == expect_mid, "sent packet");
    // 8 instructions executed (the poisoned one skipped) plus 4 + 3 stall
    // cycles = 15 cycles from start; done is seen in the 14th sampling
    // (sampling begins one cycle after start).
    chk(cyc == 8 + 4 + 3 - 1, $sformatf("cycle count %0d", cyc));
    chk(dut.u_rf.regs[0] == expect_res, "result register");
    gctrl = GC_LOAD;
    @(negedge clk); gctrl = GC_NONE;
    chk(fifo_out[0][0] == expect_res, "result leaves through the FIFO");
    chk(dut.u_rf.regs[0] == '0 || dut.u_rf.regs[0] == x, "register got FIFO content");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
