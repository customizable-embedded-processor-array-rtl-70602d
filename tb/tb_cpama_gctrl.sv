// tb_cpama_gctrl: self-checking test of the global controller.
// Feeds rows at random spacing with processors that finish early or late and
// checks: input stops after ROWS rows, GC_LOAD then GC_START follow as soon as
// all processors are done, input re-opens the cycle after START, the FIFO
// never shifts outside FILL, and a block whose processors are already done
// keeps the input closed for exactly 2 cycles (LOAD, START).
module tb_cpama_gctrl;
  import cpama_pkg::*;
  localparam int unsigned ROWS = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic row_valid, all_done, in_ready, fifo_shift;
  gctrl_e gctrl;
  logic [31:0] blocks, wait_cycles;
  int checks = 0, failures = 0;

  cpama_gctrl #(.ROWS(ROWS)) dut (.*);

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

  initial begin
    row_valid = 0; all_done = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 30; blk++) begin
      int late, hs, was_late;
      late = (blk % 3 == 1) ? $urandom_range(1, 10) : 0;
      was_late = late;
      all_done = (late == 0);
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        chk(in_ready && gctrl == GC_NONE, "ready while filling");
        row_valid = 1; #1;
        chk(fifo_shift, "shift on row");
        @(negedge clk);
        row_valid = 0;
        if (r < ROWS - 1)
          repeat ($urandom_range(0, 2)) begin
            chk(in_ready, "ready between rows");
            @(negedge clk);
          end
      end
      // now outside FILL (or handshake already running)
      hs = 0;
      while (!in_ready) begin
        if (late > 0) begin
          chk(gctrl == GC_NONE, "no command before processors are done");
          late--;
          if (late == 0) all_done = 1;
        end
        row_valid = 1; #1;
        chk(!fifo_shift, "no shift outside FILL");
        row_valid = 0;
        hs++;
        @(negedge clk);
        if (hs > 40) break;
      end
      chk(hs == 2 + was_late, "input closed for LOAD and START plus waiting");
    end
    chk(blocks == 30, "block count");
    chk(wait_cycles > 0, "waited for processors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Command sequence and handshake length, checked cycle by cycle.
  always @(posedge clk) if (rst_n) begin
    if (gctrl == GC_LOAD) begin
      @(posedge clk);
      chk(gctrl == GC_START, "START follows LOAD");
      @(posedge clk);
      chk(gctrl == GC_NONE && in_ready, "input open after handshake");
    end
  end
endmodule
