// cpama_processor: one VLIW processor of the array.
//
// A single-cycle machine built from the blocks of a simplified MIPS datapath
// without data memory and with a constant memory: program counter with
// address calculation, instruction memory, register file with FIFO registers,
// constant memory, template ALU and the accumulator ACC. Each instruction can
// do an ALU operation and a register move in the same cycle: the ALU result may
// go to ACC (EnACC) while the register write port (RegCtrl) takes either the
// ALU result or a packet from PortIn (RegSrc). ALUSrc picks operand a from the
// register read data or PortIn and operand b from the constant memory, ACC or
// PortIn. A register read also feeds PortOut, so 'send' ships that register to
// the neighbour named in the instruction. Field widths are derived from the
// configuration: R = RW register-address bits, C = CW constant-address bits,
// opcode Z = 4 bits, K = instruction width (see cpama_pkg).
//
// The datapath of this figure-level description follows the document; the
// exact instruction fields, the WAIT/done protocol and the receive stall are
// this design's choices. An instruction with 'recv' set consumes the packet the
// router presents on PortIn and stalls (no state changes) while none is there.
//
// Timing: one instruction per cycle; register, ACC and PC updates at the clock
// edge; a sent packet reaches the router output register at the next edge.
module cpama_processor
  import cpama_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int unsigned A      = 1,
  parameter int unsigned RH     = 2,
  parameter int unsigned RC     = 2,
  parameter int unsigned NCOMP  = 8,
  parameter int unsigned RW     = 4,
  parameter int unsigned IDEPTH = 64,
  parameter int unsigned CDEPTH = 16,
  parameter int unsigned ABITS  = 1,
  parameter logic [15:0] OP_EN  = 16'h3FFF,
  localparam int unsigned AW    = $clog2(IDEPTH),
  localparam int unsigned CW    = $clog2(CDEPTH),
  localparam int unsigned IW    = instr_width(RW, CW, AW, ABITS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // global control
  input  gctrl_e                      gctrl,
  input  logic [AW-1:0]               ext_addr,
  output logic                        done,
  // FIFO
  input  logic                        fifo_shift,
  input  logic [RC-1:0][A-1:0][W-1:0] fifo_in,
  output logic [RC-1:0][A-1:0][W-1:0] fifo_out,
  // router side
  output logic                        send,
  output dir_e                        send_dir,
  output logic [W-1:0]                send_data,
  output logic [ABITS-1:0]            send_arg,
  input  logic                        pin_valid,
  input  logic [W-1:0]                pin_data,
  output logic                        pin_take,
  // program and constant loading
  input  logic                        imem_we,
  input  logic [AW-1:0]               imem_addr,
  input  logic [IW-1:0]               imem_wdata,
  input  logic                        cmem_we,
  input  logic [CW-1:0]               cmem_addr,
  input  logic [W-1:0]                cmem_wdata
);

  logic [AW-1:0] pc;
  logic [IW-1:0] iword;
  instr_t        ins;
  logic [W-1:0]  rdata, cval, acc, alu_a, alu_b, result, wdata;
  logic          stall, active;

  initial begin
    assert (IW <= IWORD_MAX) else $error("instruction word too wide");
    assert (ABITS <= ABITS_MAX) else $error("argument field too wide");
  end

  cpama_pc #(.AW(AW)) u_pc (
    .clk, .rst_n, .gctrl, .ext_addr, .pcsrc(ins.pcsrc), .jaddr(ins.jaddr[AW-1:0]),
    .stall, .pc, .done
  );

  cpama_mem #(.DEPTH(IDEPTH), .WIDTH(IW)) u_imem (
    .clk, .raddr(pc), .rdata(iword),
    .we(imem_we), .waddr(imem_addr), .wdata(imem_wdata)
  );

  cpama_mem #(.DEPTH(CDEPTH), .WIDTH(W)) u_cmem (
    .clk, .raddr(ins.csel[CW-1:0]), .rdata(cval),
    .we(cmem_we), .waddr(cmem_addr), .wdata(cmem_wdata)
  );

  assign ins    = instr_unpack(IWORD_MAX'(iword), RW, CW, AW, ABITS);
  assign stall  = !done && ins.recv && !pin_valid;
  assign active = !done && !stall;

  // ALUSrc
  always_comb begin
    unique case (ins.alusrc)
      AS_REG_ACC:    begin alu_a = rdata;    alu_b = acc;      end
      AS_PORT_CONST: begin alu_a = pin_data; alu_b = cval;     end
      AS_PORT_ACC:   begin alu_a = pin_data; alu_b = acc;      end
      AS_REG_PORT:   begin alu_a = rdata;    alu_b = pin_data; end
      default:       begin alu_a = rdata;    alu_b = cval;     end
    endcase
  end

  cpama_alu #(.W(W), .OP_EN(OP_EN)) u_alu (
    .op(ins.op), .a(alu_a), .b(alu_b), .acc, .result
  );

  // RegSrc multiplexer
  assign wdata = ins.regsrc ? pin_data : result;

  cpama_regfile #(.W(W), .A(A), .RH(RH), .RC(RC), .NCOMP(NCOMP), .RW(RW)) u_rf (
    .clk, .rst_n, .gctrl, .fifo_shift, .fifo_in, .fifo_out,
    .rs(ins.rs[RW-1:0]), .rdata,
    .we(active && ins.regwe), .rd(ins.rd[RW-1:0]), .wdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   acc <= '0;
    else if (active && ins.enacc) acc <= result;
  end

  assign send      = active && ins.send;
  assign send_dir  = ins.dir;
  assign send_data = rdata;
  assign send_arg  = ins.arg[ABITS-1:0];
  assign pin_take  = active && ins.recv;

endmodule
