// cpama_pc: program counter and address calculation of an array processor.
//
// Each cycle the PC takes one of three sources (PCSrc): the next address, the
// JUMP address carried by the instruction, or, when the global controller
// issues GC_START, the externally delivered address; the last acts as a
// function call ordered by the host. These three sources follow the document.
// This design adds a WAIT source: the PC holds and 'done' is raised, telling
// the global controller the processor has finished its block; only GC_START
// leaves this state. 'stall' holds the PC for one cycle (a receive that found
// no packet). Out of reset the processor is waiting (done = 1, PC = 0).
module cpama_pc
  import cpama_pkg::*;
#(
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  gctrl_e        gctrl,
  input  logic [AW-1:0] ext_addr,
  input  pc_src_e       pcsrc,
  input  logic [AW-1:0] jaddr,
  input  logic          stall,
  output logic [AW-1:0] pc,
  output logic          done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      done <= 1'b1;
    end else if (gctrl == GC_START) begin
      pc   <= ext_addr;
      done <= 1'b0;
    end else if (!done && !stall) begin
      unique case (pcsrc)
        PC_JUMP: pc <= jaddr;
        PC_WAIT: done <= 1'b1;
        default: pc <= pc + AW'(1);
      endcase
    end
  end

endmodule
