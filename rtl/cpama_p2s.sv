// cpama_p2s: parallel-to-serial converter at the output of the array FIFO.
//
// When the FIFO shifts, the row leaving its bottom is loaded here ('load')
// and sent out BW pixels per cycle, highest column first, so that result
// blocks leave in the same order as input blocks enter (last pixel first).
// out_valid is high for WR/BW cycles after each load. A new load must not
// arrive before the previous row has left; with the serial-to-parallel
// converter running at the same rate this always holds.
//
// The assertion below uses rst_n in its disable condition; lint may report
// rst_n as used both as an asynchronous reset and as a synchronous signal.
// That second use is only the checker's, not logic, so the report stands.
module cpama_p2s #(
  parameter int unsigned W  = 32,
  parameter int unsigned A  = 1,
  parameter int unsigned BW = 1,
  parameter int unsigned WR = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          load,
  input  logic [WR-1:0][A-1:0][W-1:0]   row,
  output logic                          out_valid,
  output logic [BW-1:0][A-1:0][W-1:0]   out_pix
);

  localparam int unsigned BEATS = WR / BW;
  localparam int unsigned CNTW  = $clog2(BEATS + 1);

  logic [WR-1:0][A-1:0][W-1:0] buf_q;
  logic [CNTW-1:0] left;

  assign out_valid = left != '0;
  always_comb
    for (int unsigned l = 0; l < BW; l++) out_pix[l] = buf_q[WR-1-l];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      left  <= '0;
    end else if (load) begin
      buf_q <= row;
      left  <= CNTW'(BEATS);
    end else if (out_valid) begin
      for (int unsigned c = WR - 1; c >= BW; c--) buf_q[c] <= buf_q[c-BW];
      left <= left - CNTW'(1);
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(load && left > CNTW'(1)));

endmodule
