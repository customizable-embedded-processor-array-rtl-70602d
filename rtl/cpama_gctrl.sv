// cpama_gctrl: global controller that synchronises the FIFO with the processors.
//
// While in FILL it accepts pixels (in_ready) and lets each completed row shift
// the FIFO. After ROWS = NH + 2r rows the FIFO holds a whole block and input
// stops. As soon as every processor reports done (already on the last row, or
// after waiting in WAIT), the handshake runs: LOAD broadcasts GC_LOAD (FIFO
// and registers exchange contents), START broadcasts GC_START (every processor
// jumps to the host-supplied address), and the input re-opens in the next
// cycle. With the one cycle the memory side needs to deliver the first pixel
// of the next block, a block takes BT = max(CT, PT) + 3 cycles, the handshake
// delay HS = 3 the document gives as typical. The state
// sequence is this design's choice; the document says only that the global
// processor emits the copy command when the FIFO has received the whole block.
//
// Counters: blocks (handshakes completed) and wait_cycles (cycles spent
// waiting for processors, i.e. blocks that were compute bound).
module cpama_gctrl
  import cpama_pkg::*;
#(
  parameter int unsigned ROWS = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        row_valid,
  input  logic        all_done,
  output logic        in_ready,
  output logic        fifo_shift,
  output gctrl_e      gctrl,
  output logic [31:0] blocks,
  output logic [31:0] wait_cycles
);

  typedef enum logic [1:0] {S_FILL, S_WAIT, S_LOAD, S_START} state_e;
  state_e state;
  logic [$clog2(ROWS+1)-1:0] rows;

  assign in_ready   = state == S_FILL;
  assign fifo_shift = in_ready && row_valid;

  always_comb begin
    unique case (state)
      S_LOAD:  gctrl = GC_LOAD;
      S_START: gctrl = GC_START;
      default: gctrl = GC_NONE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_FILL;
      rows        <= '0;
      blocks      <= '0;
      wait_cycles <= '0;
    end else begin
      unique case (state)
        S_FILL: if (fifo_shift) begin
          if (32'(rows) == ROWS - 1) begin
            rows  <= '0;
            state <= all_done ? S_LOAD : S_WAIT;
          end else begin
            rows <= rows + 1'b1;
          end
        end
        S_WAIT: if (all_done) state <= S_LOAD;
                else wait_cycles <= wait_cycles + 1;
        S_LOAD:  state <= S_START;
        default: begin  // S_START
          state  <= S_FILL;
          blocks <= blocks + 1;
        end
      endcase
    end
  end

endmodule
