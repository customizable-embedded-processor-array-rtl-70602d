// tb_cpama_dot_sizes: the dot product on the array shapes of the size study.
//
// The document synthesises the dot product on arrays of 16, 64 and 200
// processors in several shapes, with neighbourhood depth r = 1 and r = 2.
// This testbench runs a set of those shapes side by side, each in a
// cpama_dot_run harness with its own image memory and host sequence, and
// checks every output pixel and the block time of each:
//   r = 1 (3 x 3 kernel): 2 x 8, 4 x 16, 8 x 8, 10 x 20, 4 x 50
//   r = 2 (5 x 5 kernel): 4 x 4, 2 x 8
// (width x height). More instances pass as well (2 x 32, and 8 x 8, 4 x 16,
// 2 x 32 at r = 2) but make the Verilator build several times longer. The 4 x 4, r = 1 shape is covered by tb_cpama_top. With
// r = 1 the program is shorter than the communication time, so a block takes
// CT + 3 cycles; the r = 2 program relays pixels and partial sums over two
// hops and is longer than CT on the 16-processor shapes, so a block takes
// PT + 3 there.
module tb_cpama_dot_sizes;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 7;
  logic fin [N];
  int   ck [N], fl [N];

  cpama_dot_run #(.NW(2),  .NH(8),  .R(1)) u_2x8_r1   (.clk, .fin(fin[0]),  .checks(ck[0]),  .failures(fl[0]));
  cpama_dot_run #(.NW(4),  .NH(16), .R(1)) u_4x16_r1  (.clk, .fin(fin[1]),  .checks(ck[1]),  .failures(fl[1]));
  cpama_dot_run #(.NW(8),  .NH(8),  .R(1)) u_8x8_r1   (.clk, .fin(fin[2]),  .checks(ck[2]),  .failures(fl[2]));
  cpama_dot_run #(.NW(10), .NH(20), .R(1)) u_10x20_r1 (.clk, .fin(fin[3]),  .checks(ck[3]),  .failures(fl[3]));
  cpama_dot_run #(.NW(4),  .NH(50), .R(1)) u_4x50_r1  (.clk, .fin(fin[4]),  .checks(ck[4]),  .failures(fl[4]));
  cpama_dot_run #(.NW(4),  .NH(4),  .R(2)) u_4x4_r2   (.clk, .fin(fin[5]),  .checks(ck[5]),  .failures(fl[5]));
  cpama_dot_run #(.NW(2),  .NH(8),  .R(2)) u_2x8_r2   (.clk, .fin(fin[6]),  .checks(ck[6]),  .failures(fl[6]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    @(posedge clk);
    do begin
      @(posedge clk);
      all = 1;
      for (int k = 0; k < N; k++) all &= fin[k];
    end while (!all);
    for (int k = 0; k < N; k++) begin
      checks += ck[k];
      failures += fl[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
