// tb_cpama_mem: self-checking test of the instruction/constant memory.
// Writes random words at random addresses, keeps a shadow copy and checks the
// asynchronous read port after every word has been written once.
module tb_cpama_mem;
  localparam int unsigned DEPTH = 64, WIDTH = 35;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] raddr, waddr;
  logic [WIDTH-1:0] rdata, wdata;
  logic we;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  cpama_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = {$urandom, $urandom};
      shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 6'(i); #1;
      checks++; if (rdata !== shadow[i]) failures++;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1;
      waddr = 6'($urandom);
      wdata = {$urandom, $urandom};
      raddr = 6'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("addr %0d got %h exp %h", raddr, rdata, shadow[raddr]); end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
