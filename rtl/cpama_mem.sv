// cpama_mem: instruction or constant memory of one array processor.
//
// A DEPTH x WIDTH array with an asynchronous read port (the processor fetches
// and decodes in the same cycle, as in a single-cycle machine) and a
// synchronous write port used to load a program or a constant table before,
// or between, runs. The same module serves as Instruction Memory (WIDTH = the
// instruction width K) and as Constant Memory (WIDTH = W, DEPTH = number of
// constants, addressed by the C-bit field of the instruction). Keeping constants
// out of the instruction word and addressing them follows the document; the
// write port is this design's choice for filling the memories (the document
// reloads them by FPGA partial reconfiguration, or through the FIFO in a
// future ASIC version). The array has no reset, so it maps onto RAM; its
// contents are undefined until written.
module cpama_mem #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
