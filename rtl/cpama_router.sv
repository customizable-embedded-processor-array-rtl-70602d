// cpama_router: network router of one array processor.
//
// Five connections: North, South, East, West and the processor. A packet is a
// pixel (W bits), a destination address and an argument number. The router is
// one de-multiplexer and one multiplexer:
//  * Out: the processor's packet is steered to the neighbour channel named by
//    its destination address (dir_e) and held in that channel's output register
//    for one cycle.
//  * In: each neighbour channel has a one-packet holding register. The
//    multiplexer hands the processor the packet of the highest-priority full
//    channel (North > South > East > West); it stays until the processor takes
//    it (pin_take), so a packet losing arbitration is delivered later.
// Neighbour-only steering, the two units and fixed port priority follow the
// document; the priority order, the holding registers and the one-cycle link
// register are this design's choices. The document assumes the program never
// sends two packets to one port at once; an assertion checks that a full
// holding register is never overwritten.
//
// Timing: a packet sent in cycle t is in the output register at t+1 and is
// visible to the receiving processor from cycle t+2.
//
// The assertion below uses rst_n in its disable condition; lint may report
// rst_n as used both as an asynchronous reset and as a synchronous signal.
// That second use is only the checker's, not logic, so the report stands.
module cpama_router
  import cpama_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned ABITS = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // from / to the processor
  input  logic                        send,
  input  dir_e                        send_dir,
  input  logic [W-1:0]                send_data,
  input  logic [ABITS-1:0]            send_arg,
  output logic                        pin_valid,
  output logic [W-1:0]                pin_data,
  output logic [ABITS-1:0]            pin_arg,
  input  logic                        pin_take,
  output logic                        conflict,   // more than one channel waiting
  // neighbour channels, indexed by dir_e
  input  logic [3:0]                  nb_in_valid,
  input  logic [3:0][W-1:0]           nb_in_data,
  input  logic [3:0][ABITS-1:0]       nb_in_arg,
  output logic [3:0]                  nb_out_valid,
  output logic [3:0][W-1:0]           nb_out_data,
  output logic [3:0][ABITS-1:0]       nb_out_arg
);

  logic [3:0]             hold_v;
  logic [3:0][W-1:0]      hold_d;
  logic [3:0][ABITS-1:0]  hold_a;
  logic [1:0]             sel;
  logic [3:0]             take_onehot;

  // De-multiplexer towards the neighbours
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nb_out_valid <= '0;
      nb_out_data  <= '0;
      nb_out_arg   <= '0;
    end else begin
      for (int d = 0; d < 4; d++) begin
        nb_out_valid[d] <= send && (send_dir == dir_e'(d));
        if (send && (send_dir == dir_e'(d))) begin
          nb_out_data[d] <= send_data;
          nb_out_arg[d]  <= send_arg;
        end
      end
    end
  end

  // Priority multiplexer towards the processor
  always_comb begin
    sel = 2'd0;
    pin_valid = 1'b0;
    for (int d = 3; d >= 0; d--)
      if (hold_v[d]) begin
        sel = 2'(d);
        pin_valid = 1'b1;
      end
    pin_data = hold_d[sel];
    pin_arg  = hold_a[sel];
    take_onehot = (pin_take && pin_valid) ? (4'b0001 << sel) : 4'b0000;
    conflict = $countones(hold_v) > 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_v <= '0;
      hold_d <= '0;
      hold_a <= '0;
    end else begin
      for (int d = 0; d < 4; d++) begin
        if (nb_in_valid[d]) begin
          hold_v[d] <= 1'b1;
          hold_d[d] <= nb_in_data[d];
          hold_a[d] <= nb_in_arg[d];
        end else if (take_onehot[d]) begin
          hold_v[d] <= 1'b0;
        end
      end
    end
  end

  for (genvar d = 0; d < 4; d++) begin : g_chk
    a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(nb_in_valid[d] && hold_v[d] && !take_onehot[d]));
  end

endmodule
