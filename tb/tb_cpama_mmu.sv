// tb_cpama_mmu: self-checking test of the memory management unit.
// A 10 x 7 image (not a multiple of the 4 x 4 block) is read from a memory
// model. The testbench plays the array: it checks every pixel of every block
// burst (order last-to-first, neighbouring pixels, zeros outside the image and
// for the two flush blocks), and returns as results the pixels of the block two
// bursts earlier plus 1000, in the same order. The output image must then be
// the input image plus 1000, with no write outside it. Runs once with BW = 1
// and checks the block count.
module tb_cpama_mmu;
  localparam int unsigned NW = 4, NH = 4, R = 1, W = 16, MAW = 12;
  localparam int unsigned WR = NW + 2 * R, HR = NH + 2 * R, BLK = WR * HR;
  localparam int IMW = 10, IMH = 7, IN_BASE = 100, OUT_BASE = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, in_ready, pix_valid, res_valid;
  logic [0:0][0:0] rd_en;
  logic [0:0][0:0][MAW-1:0] rd_addr;
  logic [0:0][0:0][W-1:0] rd_data, pix, res;
  logic [0:0] wr_en;
  logic [0:0][MAW-1:0] wr_addr;
  logic [0:0][W-1:0] wr_data;
  logic [W-1:0] mem [4096];

  cpama_mmu #(.NW(NW), .NH(NH), .R(R), .W(W), .A(1), .BW(1), .MAW(MAW)) dut (
    .clk, .rst_n, .start, .img_w(16'(IMW)), .img_h(16'(IMH)), .in_base(MAW'(IN_BASE)),
    .out_base(MAW'(OUT_BASE)), .plane_stride('0), .busy, .done,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .in_ready, .pix_valid, .pix, .res_valid, .res);

  // memory model: one-cycle read latency
  always_ff @(posedge clk) begin
    if (rd_en[0][0]) rd_data[0][0] <= mem[rd_addr[0][0]];
    if (wr_en[0]) mem[wr_addr[0]] <= wr_data[0];
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W-1:0] img(int y, int x);
    if (y < 0 || y >= IMH || x < 0 || x >= IMW) return '0;
    return W'(y * 37 + x * 11 + 5);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist [$];
  initial begin
    int nbx, nby, nb;
    nbx = (IMW + NW - 1) / NW; nby = (IMH + NH - 1) / NH; nb = nbx * nby;
    for (int a = 0; a < 4096; a++) mem[a] = 16'hDEAD;
    for (int y = 0; y < IMH; y++) for (int x = 0; x < IMW; x++) mem[IN_BASE + y * IMW + x] = img(y, x);
    start = 0; in_ready = 0; res_valid = 0; res = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int b = 0; b < nb + 2; b++) begin
      int n;
      repeat ($urandom_range(1, 4)) @(negedge clk);
      in_ready = 1;
      n = 0;
      while (n < BLK) begin
        @(negedge clk);
        // return results of block b-2 in step with the input
        res_valid = 1;
        res[0][0] = (b >= 2) ? hist[(b - 2) * BLK + n] + W'(1000) : W'($urandom);
        if (pix_valid) begin
          int s, r, c, gy, gx;
          s = n; r = HR - 1 - s / WR; c = WR - 1 - s % WR;
          gy = (b % nbx) * 0 + (b / nbx) * NH - R + r;
          gx = (b % nbx) * NW - R + c;
          if (b >= nb) chk(pix[0][0] == '0, "flush block is zero");
          else chk(pix[0][0] == img(gy, gx), $sformatf("block %0d pixel %0d got %0d exp %0d", b, n, pix[0][0], img(gy, gx)));
          hist.push_back(pix[0][0]);
          n++;
        end else begin
          res_valid = 0;
        end
        if (n == BLK - 1) in_ready = 0;   // the controller leaves FILL after the block
      end
      @(negedge clk); res_valid = 0; in_ready = 0;
      chk(!pix_valid, "burst ends with the block");
    end
    repeat (5) @(negedge clk);
    chk(done && !busy, "done after the last result block");
    for (int y = 0; y < IMH; y++)
      for (int x = 0; x < IMW; x++)
        chk(mem[OUT_BASE + y * IMW + x] == img(y, x) + W'(1000), $sformatf("out (%0d,%0d)", y, x));
    chk(mem[OUT_BASE + IMW * IMH] == 16'hDEAD && mem[OUT_BASE - 1] == 16'hDEAD, "no write outside the image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
