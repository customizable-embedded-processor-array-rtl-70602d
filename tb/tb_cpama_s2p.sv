// tb_cpama_s2p: self-checking test of the serial-to-parallel converter.
// Two instances (BW = 1 and BW = 2, row of 6 pixels) receive random pixel
// streams with gaps; each completed row must hold the first pixel of the row in
// the last column and appear exactly on the beat that completes it.
module tb_cpama_s2p;
  localparam int unsigned W = 12, WR = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic v1, rv1, v2, rv2;
  logic [0:0][0:0][W-1:0] p1;
  logic [1:0][0:0][W-1:0] p2;
  logic [WR-1:0][0:0][W-1:0] row1, row2;

  cpama_s2p #(.W(W), .A(1), .BW(1), .WR(WR)) dut1 (.clk, .rst_n, .in_valid(v1), .in_pix(p1), .row_valid(rv1), .row(row1));
  cpama_s2p #(.W(W), .A(1), .BW(2), .WR(WR)) dut2 (.clk, .rst_n, .in_valid(v2), .in_pix(p2), .row_valid(rv2), .row(row2));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] q1 [$], q2 [$];
    v1 = 0; v2 = 0; p1 = '0; p2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      v1 = ($urandom % 4) != 0;
      v2 = ($urandom % 4) != 0;
      p1[0][0] = W'($urandom); p2[0][0] = W'($urandom); p2[1][0] = W'($urandom);
      #1;
      if (v1) begin
        q1.push_back(p1[0][0]);
        checks++;
        if (rv1 != (q1.size() == WR)) begin failures++; $display("row_valid timing bw1"); end
        if (q1.size() == WR) begin
          for (int c = 0; c < WR; c++) begin
            checks++;
            if (row1[c][0] !== q1[WR-1-c]) begin failures++; $display("bw1 col %0d", c); end
          end
          q1.delete();
        end
      end else begin
        checks++; if (rv1) failures++;
      end
      if (v2) begin
        q2.push_back(p2[0][0]); q2.push_back(p2[1][0]);
        checks++;
        if (rv2 != (q2.size() == WR)) begin failures++; $display("row_valid timing bw2"); end
        if (q2.size() == WR) begin
          for (int c = 0; c < WR; c++) begin
            checks++;
            if (row2[c][0] !== q2[WR-1-c]) begin failures++; $display("bw2 col %0d", c); end
          end
          q2.delete();
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
