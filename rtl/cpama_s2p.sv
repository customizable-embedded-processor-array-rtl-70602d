// cpama_s2p: serial-to-parallel converter at the input of the array FIFO.
//
// Collects a row of WR = NW + 2r pixels arriving BW per cycle (each pixel is A
// words, one per input frame). Pixels enter at column 0 and move towards
// higher columns, so the first pixel of a row ends in the last column; with the
// FIFO shifting rows downwards this is why a block must be sent starting from
// its last pixel, as the document requires. Within one beat lane 0 is the
// earlier pixel. On the beat that completes a row, row_valid is raised for
// that cycle and 'row' shows the completed row (combinationally, including the
// pixels of this beat); the FIFO takes it at the same clock edge. BW > 1 is the
// document's multiple-data-input option; BW must divide WR.
module cpama_s2p #(
  parameter int unsigned W  = 32,
  parameter int unsigned A  = 1,
  parameter int unsigned BW = 1,
  parameter int unsigned WR = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [BW-1:0][A-1:0][W-1:0]   in_pix,
  output logic                          row_valid,
  output logic [WR-1:0][A-1:0][W-1:0]   row
);

  localparam int unsigned BEATS = WR / BW;
  localparam int unsigned CNTW  = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [WR-1:0][A-1:0][W-1:0] buf_q, nxt;
  logic [CNTW-1:0] cnt;

  initial assert (WR % BW == 0) else $error("BW must divide the row width");

  always_comb begin
    for (int unsigned c = 0; c < WR; c++)
      nxt[c] = (c >= BW) ? buf_q[c-BW] : in_pix[BW-1-c];
  end

  assign row_valid = in_valid && (32'(cnt) == BEATS - 1);
  assign row       = nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt   <= '0;
    end else if (in_valid) begin
      buf_q <= nxt;
      cnt   <= row_valid ? '0 : cnt + CNTW'(1);
    end
  end

endmodule
