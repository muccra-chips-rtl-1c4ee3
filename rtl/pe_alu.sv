// pe_alu: arithmetic logic unit of the PE core.
//
// Purely combinational, G bits wide. The operation comes from the PE's
// current context word (alu_op_e). Comparisons return 1 or 0. The multiply
// operation (low G bits of the product) exists only when HAS_MUL is set: the
// first prototype has no multiplier in its PEs and places multipliers at the
// array edge, while the second puts one in every PE. Without HAS_MUL the
// multiply code returns zero. The set of operations is this design's choice.
module pe_alu
  import muccra_pkg::*;
#(
  parameter int unsigned G       = DEF_G,
  parameter bit          HAS_MUL = 1'b0
) (
  input  alu_op_e        op,
  input  logic [G-1:0]   a,
  input  logic [G-1:0]   b,
  output logic [G-1:0]   y
);
  always_comb begin
    unique case (op)
      ALU_PASSA: y = a;
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOTA:  y = ~a;
      ALU_LTU:   y = G'(a < b);
      ALU_LTS:   y = G'($signed(a) < $signed(b));
      ALU_EQ:    y = G'(a == b);
      ALU_MINU:  y = (a < b) ? a : b;
      ALU_MAXU:  y = (a < b) ? b : a;
      ALU_MUL:   y = HAS_MUL ? G'(a * b) : '0;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
