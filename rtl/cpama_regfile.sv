// cpama_regfile: register file and FIFO registers (FR) of one processor.
//
// The file holds N = K + NCOMP registers of W bits. Registers 0..K-1 are bound
// to the processor's FIFO registers; the other NCOMP serve computation. The FIFO
// part is a grid of RH rows x RC columns of FR cells, each cell holding A words
// (one per argument, i.e. input frame), so K = RH*RC*A. RH and RC depend on where
// the processor sits: a corner holds (r+1) x (r+1) cells, a north or south edge
// (r+1) x 1, a west or east edge 1 x (r+1), a middle processor 1 x 1. Cell and
// register numbering is row-major, then by argument, so register i is bound to
// FR i.
//
// FIFO columns shift one row downwards on 'fifo_shift': row 0 takes fifo_in
// (from the processor above, or the serial-to-parallel converter) and the last
// row leaves on fifo_out (to the processor below, or the parallel-to-serial
// converter). On the global command GC_LOAD the FR cells and registers 0..K-1
// swap contents in one cycle: the processor receives the new block and its
// results enter the FIFO to be shifted out while the next block shifts in.
// Grid shapes, column-wise shifting and the GCtrl-synchronised exchange follow
// the document; doing the exchange as a swap is this design's choice.
//
// Ports: one read port (rs -> rdata, combinational), one write port (we, rd,
// wdata, at the clock edge). A write to a register that does not exist is
// ignored and a read of one returns 0.
//
// The assertion below uses rst_n in its disable condition; lint may report
// rst_n as used both as an asynchronous reset and as a synchronous signal.
// That second use is only the checker's, not logic, so the report stands.
module cpama_regfile
  import cpama_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned A     = 1,
  parameter int unsigned RH    = 2,
  parameter int unsigned RC    = 2,
  parameter int unsigned NCOMP = 8,
  parameter int unsigned RW    = 4,
  localparam int unsigned K    = RH * RC * A,
  localparam int unsigned N    = K + NCOMP
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  gctrl_e                     gctrl,
  input  logic                       fifo_shift,
  input  logic [RC-1:0][A-1:0][W-1:0] fifo_in,
  output logic [RC-1:0][A-1:0][W-1:0] fifo_out,
  input  logic [RW-1:0]              rs,
  output logic [W-1:0]               rdata,
  input  logic                       we,
  input  logic [RW-1:0]              rd,
  input  logic [W-1:0]               wdata
);

  logic [RH-1:0][RC-1:0][A-1:0][W-1:0] fr;
  logic [W-1:0] regs [N];

  // FIFO registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fr <= '0;
    end else if (gctrl == GC_LOAD) begin
      for (int unsigned i = 0; i < K; i++)
        fr[i / (RC*A)][(i / A) % RC][i % A] <= regs[i];
    end else if (fifo_shift) begin
      fr[0] <= fifo_in;
      for (int unsigned row = 1; row < RH; row++) fr[row] <= fr[row-1];
    end
  end

  assign fifo_out = fr[RH-1];

  // Registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) regs[i] <= '0;
    end else if (gctrl == GC_LOAD) begin
      for (int unsigned i = 0; i < K; i++)
        regs[i] <= fr[i / (RC*A)][(i / A) % RC][i % A];
    end else if (we && 32'(rd) < N) begin
      regs[rd] <= wdata;
    end
  end

  assign rdata = (32'(rs) < N) ? regs[rs] : '0;

  // The global controller never shifts the FIFO while it orders an exchange.
  a_no_shift_on_load: assert property (@(posedge clk) disable iff (!rst_n)
                                       !(fifo_shift && gctrl == GC_LOAD));

endmodule
