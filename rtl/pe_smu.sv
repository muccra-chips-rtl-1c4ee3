// pe_smu: Shift & Mask Unit, the data manipulator of the PE core.
//
// Combinational. The operand is shifted by a constant amount from the context
// word (logical left, logical right, arithmetic right or rotate left), then,
// when mlen is not zero, every bit from position mlen upward is cleared, so
// that a field of mlen bits is kept. Shift amounts of G or more give zero for
// the logical shifts, the sign for the arithmetic shift, and rotate by the
// amount modulo G. Shift and mask as the unit's two steps follow the unit's
// name; the exact operation set and encoding are this design's choice.
module pe_smu
  import muccra_pkg::*;
#(
  parameter int unsigned G = DEF_G
) (
  input  smu_op_e      op,
  input  logic [4:0]   shamt,
  input  logic [4:0]   mlen,
  input  logic [G-1:0] x,
  output logic [G-1:0] y
);
  logic [G-1:0]   sh;
  logic [G-1:0]   mask;
  logic [2*G-1:0] dbl;
  int unsigned    rot;

  always_comb begin
    rot = 32'(shamt) % G;
    dbl = {x, x} << rot;
    unique case (op)
      SMU_SLL: sh = x << shamt;
      SMU_SRL: sh = x >> shamt;
      SMU_SRA: sh = G'($signed(x) >>> shamt);
      SMU_ROL: sh = dbl[2*G-1 -: G];
      default: sh = x;
    endcase
    if (mlen == 5'd0 || 32'(mlen) >= G) mask = '1;
    else                                mask = (G'(1) << mlen) - G'(1);
    y = sh & mask;
  end
endmodule
