// cpama_alu: template arithmetic logic unit of one array processor.
//
// Computes result = f(op, a, b, acc) in one combinational step. It is a
// template: OP_EN has one bit per cpama_pkg::alu_op_e value, and an operation
// whose bit is clear is not built (its opcode yields 0), so each processor
// carries only the operations its program uses. Following the resource-sharing
// idea of multi-mode DSP datapaths, MUL and MAC share one multiplier, and ADD,
// SUB, MAC and SAD share one adder whose operands are selected by the opcode.
// The operation set and the shared-adder arrangement are this design's choice;
// the document names ADD, MULT and AND among the supported instructions.
//
// Ports: op (opcode), a, b (operands chosen by ALUSrc outside), acc (current
// accumulator), result. Purely combinational; W-bit two's complement, results
// wrap modulo 2^W.
module cpama_alu
  import cpama_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter logic [15:0] OP_EN = 16'h3FFF
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   acc,
  output logic [W-1:0]   result
);

  logic [W-1:0] prod, diff, absd, add_x, add_y, sum;
  logic         en;

  assign prod = (OP_EN[OP_MUL] || OP_EN[OP_MAC]) ? W'(a * b) : '0;
  assign diff = a - b;
  assign absd = ($signed(a) < $signed(b)) ? (b - a) : diff;

  // Shared adder: operand selection per opcode.
  always_comb begin
    add_x = a;
    add_y = b;
    unique case (op)
      OP_SUB:  add_y = ~b + W'(1);
      OP_MAC:  begin add_x = acc; add_y = prod; end
      OP_SAD:  begin add_x = acc; add_y = absd; end
      default: ;
    endcase
  end
  assign sum = add_x + add_y;

  always_comb begin
    en = OP_EN[op];
    unique case (op)
      OP_PASSA: result = a;
      OP_PASSB: result = b;
      OP_ADD, OP_SUB, OP_MAC, OP_SAD: result = sum;
      OP_MUL:   result = prod;
      OP_AND:   result = a & b;
      OP_OR:    result = a | b;
      OP_XOR:   result = a ^ b;
      OP_ABSD:  result = absd;
      OP_SHR:   result = W'($signed(a) >>> b[$clog2(W)-1:0]);
      OP_MIN:   result = ($signed(a) < $signed(b)) ? a : b;
      default:  result = '0;
    endcase
    if (!en) result = '0;
  end

endmodule
