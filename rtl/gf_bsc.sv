// gf_bsc - bit-shift cell (BSC) of the AOP systolic multiplier.
//
// Multiplies an operand in the extended (m+1)-bit AOP representation by x^SHIFT.
// Because the all-one polynomial P(x) = 1 + x + ... + x^m divides x^(m+1) + 1,
// products are formed modulo x^(m+1) + 1, where multiplying by x is a cyclic
// rotation of the (m+1) coefficients towards the higher powers. The cell is
// pure wiring: it costs no gates and no delay, which is why the modular
// reduction node of the signal-flow graph drops out of the critical path.
// Following the alternate PE structure, every PE receives the unshifted operand
// A0 and applies its own fixed rotation, so no shifted copies are registered.
//
// Interface: a_i (M+1 bits, bit k = coefficient of x^k) -> a_o = a_i * x^SHIFT.
// Timing: combinational.
module gf_bsc #(
  parameter int unsigned M     = 20,  // field degree m
  parameter int unsigned SHIFT = 1    // power of x applied, taken modulo m+1
) (
  input  logic [M:0] a_i,
  output logic [M:0] a_o
);
  localparam int unsigned N = M + 1;
  localparam int unsigned S = SHIFT % N;

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      a_o[(k + S) % N] = a_i[k];
    end
  end
endmodule
