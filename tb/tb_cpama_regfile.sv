// tb_cpama_regfile: self-checking test of the register file and FIFO registers.
// Uses the corner shape for r = 2 (3 x 3 FIFO cells, registers R0..R8) with two
// arguments per cell. A shadow model tracks FIFO cells and registers through
// random shifts, writes and GC_LOAD exchanges; reads, fifo_out and the
// register-to-FR numbering (row-major, then argument) are compared.
module tb_cpama_regfile;
  import cpama_pkg::*;
  localparam int unsigned W = 16, A = 2, RH = 3, RC = 3, NCOMP = 4, RW = 5;
  localparam int unsigned K = RH * RC * A, N = K + NCOMP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  gctrl_e gctrl;
  logic fifo_shift, we;
  logic [RC-1:0][A-1:0][W-1:0] fifo_in, fifo_out;
  logic [RW-1:0] rs, rd;
  logic [W-1:0] rdata, wdata;
  logic [W-1:0] m_fr [RH][RC][A];
  logic [W-1:0] m_reg [N];
  int checks = 0, failures = 0;

  cpama_regfile #(.W(W), .A(A), .RH(RH), .RC(RC), .NCOMP(NCOMP), .RW(RW)) dut (
    .clk, .rst_n, .gctrl, .fifo_shift, .fifo_in, .fifo_out, .rs, .rdata, .we, .rd, .wdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gctrl = GC_NONE; fifo_shift = 0; we = 0; rs = 0; rd = 0; wdata = 0; fifo_in = '0;
    for (int r = 0; r < RH; r++) for (int c = 0; c < RC; c++) for (int a = 0; a < A; a++) m_fr[r][c][a] = '0;
    for (int i = 0; i < N; i++) m_reg[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int kind;
      @(negedge clk);
      kind = $urandom % 8;
      gctrl = (kind == 0) ? GC_LOAD : GC_NONE;
      fifo_shift = (kind >= 1 && kind <= 3);
      we = (kind >= 4 && kind <= 6);
      rd = RW'($urandom % (N + 2));
      wdata = W'($urandom);
      for (int c = 0; c < RC; c++) for (int a = 0; a < A; a++) fifo_in[c][a] = W'($urandom);
      rs = RW'($urandom % (N + 2));
      #1;
      checks++;
      if (rdata !== ((rs < N) ? m_reg[rs] : '0)) begin failures++; $display("read r%0d got %h exp %h", rs, rdata, m_reg[rs]); end
      for (int c = 0; c < RC; c++) for (int a = 0; a < A; a++) begin
        checks++;
        if (fifo_out[c][a] !== m_fr[RH-1][c][a]) begin failures++; $display("fifo_out c%0d a%0d", c, a); end
      end
      @(posedge clk);
      if (gctrl == GC_LOAD) begin
        for (int i = 0; i < K; i++) begin
          logic [W-1:0] t;
          t = m_reg[i];
          m_reg[i] = m_fr[i / (RC*A)][(i / A) % RC][i % A];
          m_fr[i / (RC*A)][(i / A) % RC][i % A] = t;
        end
      end else begin
        if (fifo_shift) begin
          for (int r = RH - 1; r > 0; r--) m_fr[r] = m_fr[r-1];
          for (int c = 0; c < RC; c++) for (int a = 0; a < A; a++) m_fr[0][c][a] = fifo_in[c][a];
        end
        if (we && rd < N) m_reg[rd] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
