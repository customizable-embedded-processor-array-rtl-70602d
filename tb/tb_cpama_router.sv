// tb_cpama_router: self-checking test of the router.
// Checks that a processor packet leaves on the channel named by its address one
// cycle later, that incoming packets reach the processor in priority order
// N > S > E > W when several wait, that a packet is held until taken, and that
// the conflict flag rises while more than one channel waits.
module tb_cpama_router;
  import cpama_pkg::*;
  localparam int unsigned W = 16, ABITS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic send, pin_valid, pin_take, conflict;
  dir_e send_dir;
  logic [W-1:0] send_data, pin_data;
  logic [ABITS-1:0] send_arg, pin_arg;
  logic [3:0] nb_in_valid, nb_out_valid;
  logic [3:0][W-1:0] nb_in_data, nb_out_data;
  logic [3:0][ABITS-1:0] nb_in_arg, nb_out_arg;
  int checks = 0, failures = 0;

  cpama_router #(.W(W), .ABITS(ABITS)) dut (.*);

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    send = 0; send_dir = DIR_N; send_data = 0; send_arg = 0; pin_take = 0;
    nb_in_valid = 0; nb_in_data = 0; nb_in_arg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // de-multiplexer
    for (int d = 0; d < 4; d++) begin
      @(negedge clk);
      send = 1; send_dir = dir_e'(d); send_data = W'(16'h100 + d); send_arg = ABITS'(d);
      @(negedge clk);
      send = 0;
      chk(nb_out_valid == (4'b1 << d), "one output channel valid");
      chk(nb_out_data[d] == W'(16'h100 + d) && nb_out_arg[d] == ABITS'(d), "output data and argument");
      @(negedge clk);
      chk(nb_out_valid == 4'b0, "output valid for one cycle");
    end
    // multiplexer with priorities: random sets of simultaneous arrivals
    for (int n = 0; n < 60; n++) begin
      logic [3:0] set;
      int order [$];
      set = 4'($urandom_range(1, 15));
      @(negedge clk);
      nb_in_valid = set;
      for (int d = 0; d < 4; d++) begin nb_in_data[d] = W'($urandom); nb_in_arg[d] = ABITS'(d); end
      @(negedge clk);
      nb_in_valid = 0;
      chk(conflict == ($countones(set) > 1), "conflict flag");
      // idle a few cycles: packets must stay
      repeat ($urandom_range(0, 3)) @(negedge clk);
      for (int d = 0; d < 4; d++) if (set[d]) begin
        chk(pin_valid && pin_arg == ABITS'(d) && pin_data == nb_in_data[d], "priority order");
        pin_take = 1;
        @(negedge clk);
        pin_take = 0;
      end
      chk(!pin_valid, "all packets taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
