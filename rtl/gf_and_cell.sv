// gf_and_cell - AND cell of the AOP systolic multiplier (bit-multiplication node).
//
// Forms the partial product b_i * A_i: one bit of operand B gates every one of
// the (m+1) coefficients of the (shifted) operand A, with (m+1) AND gates
// working in parallel.
//
// Interface: b_i (one bit of B), a_i (M+1 bits) -> p_o = a_i if b_i else 0.
// Timing: combinational, one AND delay.
module gf_and_cell #(
  parameter int unsigned M = 20  // field degree m
) (
  input  logic       b_i,
  input  logic [M:0] a_i,
  output logic [M:0] p_o
);
  always_comb p_o = a_i & {(M + 1){b_i}};
endmodule
