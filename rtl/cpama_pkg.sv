// cpama_pkg: types and helpers shared by the processor array.
//
// The processor instruction is a compact VLIW word whose field widths follow
// the configuration (number of registers, constants and instruction memory
// depth), so the opcode, register and constant fields are only as wide as the
// program needs. Software and testbenches describe an instruction with the
// fixed-width struct instr_t; instr_pack()/instr_unpack() convert between that
// view and the K-bit word stored in instruction memory. Field order, from bit 0:
//   op(4) alusrc(3) enacc(1) regwe(1) regsrc(1) rd(RW) rs(RW) csel(CW)
//   send(1) dir(2) arg(ABITS) recv(1) pcsrc(2) jaddr(AW)
// The document fixes none of these encodings; they are this design's choice.
package cpama_pkg;

  // ALU operations. The ALU is a template: only operations whose bit is set in
  // its OP_EN parameter are built.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,   // result 0
    OP_PASSA = 4'd1,   // a
    OP_PASSB = 4'd2,   // b
    OP_ADD   = 4'd3,   // a + b
    OP_SUB   = 4'd4,   // a - b
    OP_MUL   = 4'd5,   // a * b
    OP_MAC   = 4'd6,   // acc + a * b
    OP_AND   = 4'd7,
    OP_OR    = 4'd8,
    OP_XOR   = 4'd9,
    OP_ABSD  = 4'd10,  // |a - b|
    OP_SAD   = 4'd11,  // acc + |a - b|
    OP_SHR   = 4'd12,  // a >> b (arithmetic)
    OP_MIN   = 4'd13   // signed minimum
  } alu_op_e;

  // ALUSrc: which sources feed ALU operands a and b.
  typedef enum logic [2:0] {
    AS_REG_CONST  = 3'd0,
    AS_REG_ACC    = 3'd1,
    AS_PORT_CONST = 3'd2,
    AS_PORT_ACC   = 3'd3,
    AS_REG_PORT   = 3'd4
  } alu_src_e;

  // PCSrc: next address, JUMP address from the instruction, or WAIT (hold
  // and report done until the global controller sends a command).
  typedef enum logic [1:0] {
    PC_NEXT = 2'd0,
    PC_JUMP = 2'd1,
    PC_WAIT = 2'd2
  } pc_src_e;

  // Router channels, listed in falling priority.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_S = 2'd1,
    DIR_E = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Global commands (GCtrl) broadcast to every processor.
  typedef enum logic [1:0] {
    GC_NONE  = 2'd0,
    GC_LOAD  = 2'd1,   // exchange FIFO registers with the FIFO-bound registers
    GC_START = 2'd2    // jump to the externally delivered address
  } gctrl_e;

  localparam int unsigned ABITS_MAX = 4;

  // Assembler view of one instruction.
  typedef struct packed {
    alu_op_e   op;
    alu_src_e  alusrc;
    logic      enacc;
    logic      regwe;
    logic      regsrc;   // 1: PortIn, 0: ALU result
    logic [7:0] rd;
    logic [7:0] rs;
    logic [7:0] csel;
    logic      send;
    dir_e      dir;
    logic [ABITS_MAX-1:0] arg;
    logic      recv;     // consume PortIn, stall until a packet is present
    pc_src_e   pcsrc;
    logic [7:0] jaddr;
  } instr_t;

  localparam int unsigned IWORD_MAX = 64;

  function automatic int unsigned instr_width(int unsigned rw, int unsigned cw,
                                               int unsigned aw, int unsigned ab);
    return 4 + 3 + 1 + 1 + 1 + rw + rw + cw + 1 + 2 + ab + 1 + 2 + aw;
  endfunction

  function automatic logic [IWORD_MAX-1:0] put(logic [IWORD_MAX-1:0] w, int unsigned off,
                                               int unsigned len, logic [7:0] v);
    logic [IWORD_MAX-1:0] r;
    r = w;
    for (int unsigned b = 0; b < 8; b++)
      if (b < len && off + b < IWORD_MAX) r[off+b] = v[b];
    return r;
  endfunction

  function automatic logic [7:0] get(logic [IWORD_MAX-1:0] w, int unsigned off, int unsigned len);
    logic [7:0] r;
    r = '0;
    for (int unsigned b = 0; b < 8; b++)
      if (b < len && off + b < IWORD_MAX) r[b] = w[off+b];
    return r;
  endfunction

  function automatic logic [IWORD_MAX-1:0] instr_pack(instr_t i, int unsigned rw, int unsigned cw,
                                                      int unsigned aw, int unsigned ab);
    logic [IWORD_MAX-1:0] w;
    int unsigned o;
    w = '0; o = 0;
    w = put(w, o, 4, 8'(i.op));      o += 4;
    w = put(w, o, 3, 8'(i.alusrc));  o += 3;
    w = put(w, o, 1, 8'(i.enacc));   o += 1;
    w = put(w, o, 1, 8'(i.regwe));   o += 1;
    w = put(w, o, 1, 8'(i.regsrc));  o += 1;
    w = put(w, o, rw, i.rd);         o += rw;
    w = put(w, o, rw, i.rs);         o += rw;
    w = put(w, o, cw, i.csel);       o += cw;
    w = put(w, o, 1, 8'(i.send));    o += 1;
    w = put(w, o, 2, 8'(i.dir));     o += 2;
    w = put(w, o, ab, 8'(i.arg));    o += ab;
    w = put(w, o, 1, 8'(i.recv));    o += 1;
    w = put(w, o, 2, 8'(i.pcsrc));   o += 2;
    w = put(w, o, aw, i.jaddr);
    return w;
  endfunction

  function automatic instr_t instr_unpack(logic [IWORD_MAX-1:0] w, int unsigned rw, int unsigned cw,
                                          int unsigned aw, int unsigned ab);
    instr_t i;
    int unsigned o;
    o = 0;
    i.op     = alu_op_e'(get(w, o, 4));   o += 4;
    i.alusrc = alu_src_e'(get(w, o, 3));  o += 3;
    i.enacc  = get(w, o, 1) != 0;         o += 1;
    i.regwe  = get(w, o, 1) != 0;         o += 1;
    i.regsrc = get(w, o, 1) != 0;         o += 1;
    i.rd     = get(w, o, rw);             o += rw;
    i.rs     = get(w, o, rw);             o += rw;
    i.csel   = get(w, o, cw);             o += cw;
    i.send   = get(w, o, 1) != 0;         o += 1;
    i.dir    = dir_e'(get(w, o, 2));      o += 2;
    i.arg    = ABITS_MAX'(get(w, o, ab)); o += ab;
    i.recv   = get(w, o, 1) != 0;         o += 1;
    i.pcsrc  = pc_src_e'(get(w, o, 2));   o += 2;
    i.jaddr  = get(w, o, aw);
    return i;
  endfunction

  // Number of FIFO-register rows (or columns) a processor holds: one for its
  // centre pixel plus r more on each array border it touches.
  function automatic int unsigned fr_span(int unsigned idx, int unsigned n, int unsigned r);
    return 1 + ((idx == 0) ? r : 0) + ((idx == n - 1) ? r : 0);
  endfunction

  // First global FIFO row (or column) owned by processor idx.
  function automatic int unsigned fr_first(int unsigned idx, int unsigned r);
    return (idx == 0) ? 0 : idx + r;
  endfunction

endpackage
