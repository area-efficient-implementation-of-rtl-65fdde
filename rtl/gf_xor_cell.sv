// gf_xor_cell - XOR cell of the AOP systolic multiplier (bit-addition node).
//
// Adds two polynomials of the extended (m+1)-bit representation over GF(2),
// i.e. a bitwise XOR with (m+1) XOR gates working in parallel.
//
// Interface: x_i, y_i (M+1 bits each) -> s_o = x_i ^ y_i.
// Timing: combinational, one XOR delay; this is the critical path of the
// retimed systolic array.
module gf_xor_cell #(
  parameter int unsigned M = 20  // field degree m
) (
  input  logic [M:0] x_i,
  input  logic [M:0] y_i,
  output logic [M:0] s_o
);
  always_comb s_o = x_i ^ y_i;
endmodule
