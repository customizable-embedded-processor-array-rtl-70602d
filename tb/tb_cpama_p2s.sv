// tb_cpama_p2s: self-checking test of the parallel-to-serial converter.
// Loads random rows of 6 pixels into BW = 1 and BW = 2 instances at random
// spacing (never before the previous row has left) and checks that each row
// leaves highest column first, BW pixels per cycle, in WR/BW cycles.
module tb_cpama_p2s;
  localparam int unsigned W = 12, WR = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load1, load2, ov1, ov2;
  logic [WR-1:0][0:0][W-1:0] row;
  logic [0:0][0:0][W-1:0] o1;
  logic [1:0][0:0][W-1:0] o2;

  cpama_p2s #(.W(W), .A(1), .BW(1), .WR(WR)) dut1 (.clk, .rst_n, .load(load1), .row, .out_valid(ov1), .out_pix(o1));
  cpama_p2s #(.W(W), .A(1), .BW(2), .WR(WR)) dut2 (.clk, .rst_n, .load(load2), .row, .out_valid(ov2), .out_pix(o2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load1 = 0; load2 = 0; row = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 80; n++) begin
      logic [WR-1:0][0:0][W-1:0] r;
      @(negedge clk);
      for (int c = 0; c < WR; c++) r[c][0] = W'($urandom);
      row = r; load1 = 1; load2 = 1;
      @(negedge clk);
      load1 = 0; load2 = 0;
      for (int t = 0; t < WR; t++) begin
        checks++;
        if (!ov1 || o1[0][0] !== r[WR-1-t][0]) begin failures++; $display("bw1 beat %0d", t); end
        if (t < WR / 2) begin
          checks++;
          if (!ov2 || o2[0][0] !== r[WR-1-2*t][0] || o2[1][0] !== r[WR-2-2*t][0]) begin failures++; $display("bw2 beat %0d", t); end
        end else begin
          checks++;
          if (ov2) begin failures++; $display("bw2 too long"); end
        end
        @(negedge clk);
      end
      checks++;
      if (ov1) begin failures++; $display("bw1 too long"); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
