// Stage 1 of the three-operand adder: bitwise addition.
//
// A row of N independent full adders (a carry-save layer). Bit i reduces the
// three operand bits a_i, b_i, c_i to a partial sum s_i = a^b^c and a partial
// carry cy_i = majority(a,b,c), so that a + b + c = s + 2*cy. No carry moves
// between bits here; that is left to the prefix stage.
//
// Interface: a, b, c are the N-bit operands; s and cy are N bits each.
// Timing: combinational, one full-adder delay.
// The equations are the ones the adder architecture defines for this stage;
// the width N = 16 is the size of the adder the design is drawn for.
module bitwise_add #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);

  always_comb begin
    s  = a ^ b ^ c;
    cy = (a & b) | (b & c) | (c & a);
  end

endmodule
