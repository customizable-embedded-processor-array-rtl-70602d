// cpama_top: the compute device of the customizable processor array.
//
// Image processing is done block by block: an NH x NW array of small VLIW
// processors works on one NH x NW block of pixels, one pixel per processor,
// while the next block (with r rings of neighbouring pixels) streams into the
// distributed FIFO and the results of an earlier block stream out of it. This
// top joins the three on-chip parts:
//   * cpama_mmu   - reads blocks from the image memory and writes results back,
//   * cpama_gctrl - global controller: counts FIFO rows and, once a block is in
//                   and all processors are done, issues GC_LOAD and GC_START,
//   * cpama_array - processors, routers, FIFO and the two converters.
// The image memory and the host processor are outside: their signals are
// ports. The host loads each processor's instruction and constant memory
// through the prog_* port, sets the image geometry and the program entry
// address (ext_addr), and pulses start; done rises when the last result is
// written. Throughput per block is max(communication, processing) + 3 cycles,
// communication being (NW+2r)(NH+2r)/BW cycles.
//
// Default sizes: a 4 x 4 array of 32-bit processors with neighbourhood depth
// r = 1 and one pixel per cycle, the configuration the document compares with
// other arrays; every size is a parameter.
//
// The assertion below uses rst_n in its disable condition; lint may report
// rst_n as used both as an asynchronous reset and as a synchronous signal.
// That second use is only the checker's, not logic, so the report stands.
module cpama_top
  import cpama_pkg::*;
#(
  parameter int unsigned NW     = 4,
  parameter int unsigned NH     = 4,
  parameter int unsigned R      = 1,
  parameter int unsigned W      = 32,
  parameter int unsigned A      = 1,
  parameter int unsigned BW     = 1,
  parameter int unsigned NCOMP  = 8,
  parameter int unsigned IDEPTH = 64,
  parameter int unsigned CDEPTH = 16,
  parameter int unsigned ABITS  = 1,
  parameter logic [15:0] OP_EN  = 16'h3FFF,
  parameter int unsigned MAW    = 24,
  localparam int unsigned KMAX  = fr_span(0, NH, R) * fr_span(0, NW, R) * A,
  localparam int unsigned RW    = $clog2(KMAX + NCOMP),
  localparam int unsigned AW    = $clog2(IDEPTH),
  localparam int unsigned CW    = $clog2(CDEPTH),
  localparam int unsigned IW    = instr_width(RW, CW, AW, ABITS),
  localparam int unsigned NODES = NW * NH,
  localparam int unsigned NDW   = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned PAW   = (AW > CW) ? AW : CW,
  localparam int unsigned PDW   = (IW > W) ? IW : W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host
  input  logic                          start,
  input  logic [15:0]                   img_w,
  input  logic [15:0]                   img_h,
  input  logic [MAW-1:0]                in_base,
  input  logic [MAW-1:0]                out_base,
  input  logic [MAW-1:0]                plane_stride,
  input  logic [AW-1:0]                 ext_addr,
  output logic                          busy,
  output logic                          done,
  input  logic                          prog_we,
  input  logic [NDW-1:0]                prog_node,
  input  logic                          prog_sel,
  input  logic [PAW-1:0]                prog_addr,
  input  logic [PDW-1:0]                prog_data,
  // image memory
  output logic [BW-1:0][A-1:0]          rd_en,
  output logic [BW-1:0][A-1:0][MAW-1:0] rd_addr,
  input  logic [BW-1:0][A-1:0][W-1:0]   rd_data,
  output logic [BW-1:0]                 wr_en,
  output logic [BW-1:0][MAW-1:0]        wr_addr,
  output logic [BW-1:0][W-1:0]          wr_data,
  // status
  output gctrl_e                        gctrl,
  output logic                          conflict_any,
  output logic [31:0]                   blocks,
  output logic [31:0]                   wait_cycles
);

  logic in_ready, pix_valid, in_valid, row_valid, fifo_shift, all_done, res_valid;
  logic [BW-1:0][A-1:0][W-1:0] pix, res;

  cpama_mmu #(.NW(NW), .NH(NH), .R(R), .W(W), .A(A), .BW(BW), .MAW(MAW)) u_mmu (
    .clk, .rst_n, .start, .img_w, .img_h, .in_base, .out_base, .plane_stride,
    .busy, .done, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .in_ready, .pix_valid, .pix, .res_valid, .res
  );

  assign in_valid = pix_valid && in_ready;

  cpama_gctrl #(.ROWS(NH + 2*R)) u_gctrl (
    .clk, .rst_n, .row_valid, .all_done, .in_ready, .fifo_shift, .gctrl,
    .blocks, .wait_cycles
  );

  cpama_array #(
    .NW(NW), .NH(NH), .R(R), .W(W), .A(A), .BW(BW), .NCOMP(NCOMP),
    .IDEPTH(IDEPTH), .CDEPTH(CDEPTH), .ABITS(ABITS), .OP_EN(OP_EN)
  ) u_array (
    .clk, .rst_n, .in_valid, .in_pix(pix), .row_valid,
    .out_valid(res_valid), .out_pix(res),
    .fifo_shift, .gctrl, .ext_addr, .all_done, .conflict_any,
    .prog_we, .prog_node, .prog_sel, .prog_addr, .prog_data
  );

  a_no_lost_pixel: assert property (@(posedge clk) disable iff (!rst_n)
                                    pix_valid |-> in_ready);

endmodule
