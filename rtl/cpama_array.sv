// cpama_array: the processor array with its network and distributed FIFO.
//
// NH x NW processors, each paired with a router, process one image block of
// NH x NW pixels at a time, one centre pixel per processor. A block arrives with
// r rings of neighbouring pixels, i.e. (NH+2r) x (NW+2r) pixels, through the
// distributed FIFO: every processor owns the FIFO registers of the pixels it
// must hold (corner (r+1)^2 cells, north/south edge (r+1) x 1, west/east edge
// 1 x (r+1), middle 1), and the FIFO columns run straight down through the
// processors of one array column. A serial-to-parallel converter feeds the top
// row; a parallel-to-serial converter drains the bottom row. Middle processors
// fetch the neighbouring pixels they need from their neighbours through the
// routers (North/South/East/West links between adjacent routers only).
//
// Control comes from outside: fifo_shift moves every FIFO column one row down
// (driven by the global controller when the converter completes a row), gctrl
// and ext_addr are broadcast to all processors, and all_done reports that every
// processor has finished its block. Processor (i,j) is node number i*NW + j for
// program loading (prog_sel 0: instruction memory, 1: constant memory).
//
// The register and FIFO layout, the column-wise FIFO, the converters and the
// mesh of routers follow the document; bus widths and the loading port are this
// design's choices. All processors get the same operation set (OP_EN) and the
// same number of computation registers (NCOMP).
//
// Each router also delivers the argument number of an incoming packet
// (pin_arg). The processor has no use for it yet (a received word always
// goes to the register the instruction names), so lint reports it unused.
// It is kept so that a processor variant can steer received words by
// argument. Lint may also report rst_n as used both asynchronously and
// synchronously: the second use is only the disable condition of assertions
// in the sub-modules.
module cpama_array
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
  localparam int unsigned WR    = NW + 2*R,
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
  input  logic                        clk,
  input  logic                        rst_n,
  // pixel input (already accepted by the global controller)
  input  logic                        in_valid,
  input  logic [BW-1:0][A-1:0][W-1:0] in_pix,
  output logic                        row_valid,
  // results out
  output logic                        out_valid,
  output logic [BW-1:0][A-1:0][W-1:0] out_pix,
  // global control
  input  logic                        fifo_shift,
  input  gctrl_e                      gctrl,
  input  logic [AW-1:0]               ext_addr,
  output logic                        all_done,
  output logic                        conflict_any,
  // program loading
  input  logic                        prog_we,
  input  logic [NDW-1:0]              prog_node,
  input  logic                        prog_sel,
  input  logic [PAW-1:0]              prog_addr,
  input  logic [PDW-1:0]              prog_data
);

  localparam int unsigned RCMAX = fr_span(0, NW, R);

  typedef logic [RCMAX-1:0][A-1:0][W-1:0] col_bus_t;

  logic [WR-1:0][A-1:0][W-1:0] s2p_row, p2s_row;
  col_bus_t fout [NH][NW];
  logic [3:0]            nbo_v [NH][NW];
  logic [3:0][W-1:0]     nbo_d [NH][NW];
  logic [3:0][ABITS-1:0] nbo_a [NH][NW];
  logic [NODES-1:0] done_v, conf_v;

  cpama_s2p #(.W(W), .A(A), .BW(BW), .WR(WR)) u_s2p (
    .clk, .rst_n, .in_valid, .in_pix, .row_valid, .row(s2p_row)
  );

  cpama_p2s #(.W(W), .A(A), .BW(BW), .WR(WR)) u_p2s (
    .clk, .rst_n, .load(fifo_shift), .row(p2s_row), .out_valid, .out_pix
  );

  assign all_done     = &done_v;
  assign conflict_any = |conf_v;

  for (genvar i = 0; i < NH; i++) begin : g_row
    for (genvar j = 0; j < NW; j++) begin : g_col
      localparam int unsigned RH_N = fr_span(i, NH, R);
      localparam int unsigned RC_N = fr_span(j, NW, R);
      localparam int unsigned C0   = fr_first(j, R);
      localparam int unsigned ID   = i * NW + j;

      logic [RC_N-1:0][A-1:0][W-1:0] fi, fo;
      logic               send, pin_valid, pin_take;
      dir_e               send_dir;
      logic [W-1:0]       send_data, pin_data;
      logic [ABITS-1:0]   send_arg, pin_arg;
      logic [3:0]            nbi_v;
      logic [3:0][W-1:0]     nbi_d;
      logic [3:0][ABITS-1:0] nbi_a;

      // FIFO column wiring
      if (i == 0) begin : g_top
        for (genvar c = 0; c < RC_N; c++) begin : g_c
          assign fi[c] = s2p_row[C0 + c];
        end
      end else begin : g_mid
        assign fi = fout[i-1][j][RC_N-1:0];
      end
      assign fout[i][j] = col_bus_t'(fo);
      if (i == NH - 1) begin : g_bot
        for (genvar c = 0; c < RC_N; c++) begin : g_c
          assign p2s_row[C0 + c] = fo[c];
        end
      end

      // Router links to adjacent nodes (absent neighbours send nothing)
      always_comb begin
        nbi_v = '0; nbi_d = '0; nbi_a = '0;
        if (i > 0) begin
          nbi_v[DIR_N] = nbo_v[i-1][j][DIR_S]; nbi_d[DIR_N] = nbo_d[i-1][j][DIR_S]; nbi_a[DIR_N] = nbo_a[i-1][j][DIR_S];
        end
        if (i < NH - 1) begin
          nbi_v[DIR_S] = nbo_v[i+1][j][DIR_N]; nbi_d[DIR_S] = nbo_d[i+1][j][DIR_N]; nbi_a[DIR_S] = nbo_a[i+1][j][DIR_N];
        end
        if (j < NW - 1) begin
          nbi_v[DIR_E] = nbo_v[i][j+1][DIR_W]; nbi_d[DIR_E] = nbo_d[i][j+1][DIR_W]; nbi_a[DIR_E] = nbo_a[i][j+1][DIR_W];
        end
        if (j > 0) begin
          nbi_v[DIR_W] = nbo_v[i][j-1][DIR_E]; nbi_d[DIR_W] = nbo_d[i][j-1][DIR_E]; nbi_a[DIR_W] = nbo_a[i][j-1][DIR_E];
        end
      end

      cpama_router #(.W(W), .ABITS(ABITS)) u_router (
        .clk, .rst_n,
        .send, .send_dir, .send_data, .send_arg,
        .pin_valid, .pin_data, .pin_arg, .pin_take, .conflict(conf_v[ID]),
        .nb_in_valid(nbi_v), .nb_in_data(nbi_d), .nb_in_arg(nbi_a),
        .nb_out_valid(nbo_v[i][j]), .nb_out_data(nbo_d[i][j]), .nb_out_arg(nbo_a[i][j])
      );

      cpama_processor #(
        .W(W), .A(A), .RH(RH_N), .RC(RC_N), .NCOMP(NCOMP), .RW(RW),
        .IDEPTH(IDEPTH), .CDEPTH(CDEPTH), .ABITS(ABITS), .OP_EN(OP_EN)
      ) u_proc (
        .clk, .rst_n, .gctrl, .ext_addr, .done(done_v[ID]),
        .fifo_shift, .fifo_in(fi), .fifo_out(fo),
        .send, .send_dir, .send_data, .send_arg,
        .pin_valid, .pin_data, .pin_take,
        .imem_we(prog_we && !prog_sel && 32'(prog_node) == ID),
        .imem_addr(prog_addr[AW-1:0]), .imem_wdata(prog_data[IW-1:0]),
        .cmem_we(prog_we && prog_sel && 32'(prog_node) == ID),
        .cmem_addr(prog_addr[CW-1:0]), .cmem_wdata(prog_data[W-1:0])
      );
    end
  end

endmodule
