// cpama_mmu: memory management unit between the image memory and the array.
//
// Walks an img_w x img_h image block by block, left to right and then down.
// For each block it reads the (NH+2r) x (NW+2r) pixels the array needs (the
// block and r rings of neighbouring pixels) and sends them starting with the
// last pixel of the block and ending with the first, which is the order the
// serial-to-parallel converter and the downward FIFO require. Neighbouring
// pixels that lie outside the image ("non-real" pixels) are sent as 0. After
// the last block two all-zero flush blocks are sent so that the results of the
// last real blocks are pushed out of the FIFO.
//
// On the way back, the result stream of the array is counted. It has the same
// order as the input and runs two blocks behind it: the FIFO streams out block
// k-2's results while block k streams in (block k-1 is being computed). The
// first two result blocks carry no results and are skipped; the centre pixels that fall inside the image
// are written to the output image at out_base. Argument (frame) a of a pixel is
// read from in_base + a*plane_stride + y*img_w + x.
//
// Handshake: a block is sent as an uninterrupted burst starting in the cycle
// in_ready is seen high;
// the next burst waits until in_ready has dropped (the controller is busy with
// the handshake) and risen again. Memory reads have one cycle of latency; BW
// lanes read and write independent addresses. 'done' rises when every result
// has been written. The document gives the unit's task only; the address
// walk, padding with zeros and the flush block are this design's choices.
module cpama_mmu #(
  parameter int unsigned NW  = 4,
  parameter int unsigned NH  = 4,
  parameter int unsigned R   = 1,
  parameter int unsigned W   = 32,
  parameter int unsigned A   = 1,
  parameter int unsigned BW  = 1,
  parameter int unsigned MAW = 24
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // configuration from the host
  input  logic                         start,
  input  logic [15:0]                  img_w,
  input  logic [15:0]                  img_h,
  input  logic [MAW-1:0]               in_base,
  input  logic [MAW-1:0]               out_base,
  input  logic [MAW-1:0]               plane_stride,
  output logic                         busy,
  output logic                         done,
  // image memory
  output logic [BW-1:0][A-1:0]         rd_en,
  output logic [BW-1:0][A-1:0][MAW-1:0] rd_addr,
  input  logic [BW-1:0][A-1:0][W-1:0]  rd_data,
  output logic [BW-1:0]                wr_en,
  output logic [BW-1:0][MAW-1:0]       wr_addr,
  output logic [BW-1:0][W-1:0]         wr_data,
  // array side
  input  logic                         in_ready,
  output logic                         pix_valid,
  output logic [BW-1:0][A-1:0][W-1:0]  pix,
  input  logic                         res_valid,
  input  logic [BW-1:0][A-1:0][W-1:0]  res
);

  localparam int unsigned WR    = NW + 2*R;
  localparam int unsigned HR    = NH + 2*R;
  localparam int unsigned BEATS = WR * HR / BW;

  typedef enum logic [1:0] {I_IDLE, I_WAIT_RDY, I_BURST, I_WAIT_LOW} istate_e;
  istate_e istate;

  logic [15:0] nbx, nby, bx, by, obx, oby;
  logic [31:0] beat, obeat;
  logic        last_blk, o_active;
  logic [1:0]  flush, o_skip;
  logic [BW-1:0] lane_ok, lane_ok_q;
  logic        issue, issue_q;

  // Block counts, rounded up
  assign nbx = 16'((32'(img_w) + NW - 1) / NW);
  assign nby = 16'((32'(img_h) + NH - 1) / NH);

  // Input side: address generation for the current beat
  always_comb begin
    issue = (istate == I_BURST) || (istate == I_WAIT_RDY && in_ready);
    for (int unsigned l = 0; l < BW; l++) begin
      int s, row, col, gy, gx;
      s   = int'(beat) * int'(BW) + int'(l);
      row = int'(HR) - 1 - s / int'(WR);
      col = int'(WR) - 1 - s % int'(WR);
      gy  = int'(by) * int'(NH) - int'(R) + row;
      gx  = int'(bx) * int'(NW) - int'(R) + col;
      lane_ok[l] = issue && flush == 2'd0 && gy >= 0 && gy < int'(img_h) && gx >= 0 && gx < int'(img_w);
      for (int unsigned a = 0; a < A; a++) begin
        rd_en[l][a]   = lane_ok[l];
        rd_addr[l][a] = MAW'(in_base + MAW'(a) * plane_stride + MAW'(gy) * MAW'(img_w) + MAW'(gx));
      end
    end
  end

  assign last_blk = (bx == nbx - 1) && (by == nby - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      istate    <= I_IDLE;
      beat      <= '0;
      bx        <= '0;
      by        <= '0;
      flush     <= '0;
      issue_q   <= 1'b0;
      lane_ok_q <= '0;
    end else begin
      issue_q   <= issue;
      lane_ok_q <= lane_ok;
      unique case (istate)
        I_IDLE: if (start) begin
          bx <= '0; by <= '0; flush <= '0; beat <= '0;
          istate <= I_WAIT_RDY;
        end
        I_WAIT_RDY: if (in_ready) begin
          istate <= I_BURST;
          beat   <= 1;
        end
        I_BURST: begin
          if (beat == BEATS - 1) begin
            beat <= '0;
            if (flush == 2'd2) begin
              istate <= I_IDLE;
            end else if (flush == 2'd1) begin
              istate <= I_WAIT_LOW;
              flush  <= 2'd2;
            end else begin
              istate <= I_WAIT_LOW;
              if (last_blk) flush <= 2'd1;
              else if (bx == nbx - 1) begin bx <= '0; by <= by + 1'b1; end
              else bx <= bx + 1'b1;
            end
          end else begin
            beat <= beat + 1;
          end
        end
        default: if (!in_ready) istate <= I_WAIT_RDY;
      endcase
    end
  end

  // Read data returns one cycle after the read; non-real pixels become 0.
  assign pix_valid = issue_q;
  always_comb
    for (int unsigned l = 0; l < BW; l++)
      pix[l] = lane_ok_q[l] ? rd_data[l] : '0;

  // Output side: the stream of block k carries the results of block k-1.
  always_comb begin
    for (int unsigned l = 0; l < BW; l++) begin
      int s, row, col, gy, gx;
      s   = int'(obeat) * int'(BW) + int'(l);
      row = int'(HR) - 1 - s / int'(WR);
      col = int'(WR) - 1 - s % int'(WR);
      gy  = int'(oby) * int'(NH) - int'(R) + row;
      gx  = int'(obx) * int'(NW) - int'(R) + col;
      wr_en[l]   = res_valid && o_active && o_skip == 2'd0 &&
                   row >= int'(R) && row < int'(R + NH) && col >= int'(R) && col < int'(R + NW) &&
                   gy < int'(img_h) && gx < int'(img_w);
      wr_addr[l] = MAW'(out_base + MAW'(gy) * MAW'(img_w) + MAW'(gx));
      wr_data[l] = res[l][0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      obeat    <= '0;
      obx      <= '0;
      oby      <= '0;
      o_active <= 1'b0;
      o_skip   <= '0;
      done     <= 1'b0;
    end else if (istate == I_IDLE && start) begin
      obeat <= '0; obx <= '0; oby <= '0;
      o_active <= 1'b1; o_skip <= 2'd2; done <= 1'b0;
    end else if (o_active && res_valid) begin
      if (obeat == BEATS - 1) begin
        obeat <= '0;
        if (o_skip != 2'd0) begin
          o_skip <= o_skip - 2'd1;
        end else if (obx == nbx - 1 && oby == nby - 1) begin
          o_active <= 1'b0;
          done     <= 1'b1;
        end else if (obx == nbx - 1) begin
          obx <= '0; oby <= oby + 1'b1;
        end else begin
          obx <= obx + 1'b1;
        end
      end else begin
        obeat <= obeat + 1;
      end
    end
  end

  assign busy = (istate != I_IDLE) || o_active;

endmodule
