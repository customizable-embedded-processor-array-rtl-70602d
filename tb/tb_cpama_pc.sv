// tb_cpama_pc: self-checking test of the program counter.
// Checks reset into WAIT, GC_START loading the external address, sequential
// stepping, JUMP, stall, and WAIT raising done and holding the PC.
module tb_cpama_pc;
  import cpama_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  gctrl_e gctrl;
  logic [5:0] ext_addr, jaddr, pc;
  pc_src_e pcsrc;
  logic stall, done;
  int checks = 0, failures = 0;

  cpama_pc #(.AW(6)) dut (.clk, .rst_n, .gctrl, .ext_addr, .pcsrc, .jaddr, .stall, .pc, .done);

  task automatic expect_pc(logic [5:0] p, logic d, string what);
    checks++;
    if (pc !== p || done !== d) begin
      failures++;
      $display("%s: pc=%0d done=%0b, expected %0d %0b", what, pc, done, p, d);
    end
  endtask

  task automatic step(gctrl_e g, pc_src_e s, logic [5:0] j, logic st);
    @(negedge clk);
    gctrl = g; pcsrc = s; jaddr = j; stall = st;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gctrl = GC_NONE; pcsrc = PC_NEXT; jaddr = 0; stall = 0; ext_addr = 6'd40;
    #12; expect_pc(0, 1, "reset");
    rst_n = 1;
    step(GC_NONE, PC_NEXT, 0, 0);  expect_pc(0, 1, "waiting after reset");
    step(GC_START, PC_NEXT, 0, 0); expect_pc(40, 0, "start at external address");
    step(GC_NONE, PC_NEXT, 0, 0);  expect_pc(41, 0, "next");
    step(GC_NONE, PC_NEXT, 0, 1);  expect_pc(41, 0, "stall holds");
    step(GC_NONE, PC_JUMP, 6'd5, 0); expect_pc(5, 0, "jump");
    step(GC_NONE, PC_NEXT, 0, 0);  expect_pc(6, 0, "next after jump");
    step(GC_NONE, PC_WAIT, 0, 0);  expect_pc(6, 1, "wait");
    step(GC_NONE, PC_NEXT, 0, 0);  expect_pc(6, 1, "stays waiting");
    ext_addr = 6'd63;
    step(GC_START, PC_NEXT, 0, 0); expect_pc(63, 0, "second start");
    step(GC_NONE, PC_NEXT, 0, 0);  expect_pc(0, 0, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
