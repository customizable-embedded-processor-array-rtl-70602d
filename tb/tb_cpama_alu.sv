// tb_cpama_alu: self-checking test of the template ALU.
// Drives every opcode with random and corner operands on a full ALU and on one
// built with only ADD and MUL enabled, and compares with a reference model.
module tb_cpama_alu;
  import cpama_pkg::*;
  localparam int unsigned W = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  alu_op_e op;
  logic [W-1:0] a, b, acc, res_full, res_small;
  int checks = 0, failures = 0;

  cpama_alu #(.W(W)) dut_full (.op, .a, .b, .acc, .result(res_full));
  cpama_alu #(.W(W), .OP_EN(16'h0001 << OP_ADD | 16'h0001 << OP_MUL)) dut_small
    (.op, .a, .b, .acc, .result(res_small));

  function automatic logic [W-1:0] ref_alu(alu_op_e o, logic [W-1:0] x, logic [W-1:0] y, logic [W-1:0] z);
    logic signed [W-1:0] sx, sy;
    sx = x; sy = y;
    case (o)
      OP_PASSA: return x;
      OP_PASSB: return y;
      OP_ADD:   return x + y;
      OP_SUB:   return x - y;
      OP_MUL:   return x * y;
      OP_MAC:   return z + x * y;
      OP_AND:   return x & y;
      OP_OR:    return x | y;
      OP_XOR:   return x ^ y;
      OP_ABSD:  return (sx > sy) ? x - y : y - x;
      OP_SAD:   return z + ((sx > sy) ? x - y : y - x);
      OP_SHR:   return W'(sx >>> y[4:0]);
      OP_MIN:   return (sx < sy) ? x : y;
      default:  return '0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      op  = alu_op_e'(n % 16);
      a   = (n < 32) ? W'(n) : $urandom;
      b   = (n % 5 == 0) ? W'($urandom_range(0, 40)) : $urandom;
      acc = $urandom;
      if (n % 7 == 0) a = b;  // equal operands for ABSD / MIN
      @(posedge clk);
      checks++;
      if (res_full !== ref_alu(op, a, b, acc)) begin
        failures++;
        $display("full op=%0d a=%h b=%h acc=%h got %h exp %h", op, a, b, acc, res_full, ref_alu(op, a, b, acc));
      end
      checks++;
      if (res_small !== ((op == OP_ADD || op == OP_MUL) ? ref_alu(op, a, b, acc) : '0)) begin
        failures++;
        $display("small op=%0d got %h", op, res_small);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
