// aop_adder_cell - adder cell (AC) of the AOP systolic multiplier.
//
// A registered XOR cell of (m+1) XOR gates. The same structure serves two
// places: as the last PE of each branch it adds the final partial product to
// the running sum, and as the AC after the branches it adds the results of two
// parallel branches (a tree of ACs when there are more than two branches).
//
// Interface: x_i, y_i (M+1 bits) -> z_q = x_i ^ y_i, registered.
// Timing: one register stage; one XOR delay.
module aop_adder_cell #(
  parameter int unsigned M = 20  // field degree m
) (
  input  logic       clk,
  input  logic [M:0] x_i,
  input  logic [M:0] y_i,
  output logic [M:0] z_q
);
  logic [M:0] s;

  gf_xor_cell #(.M(M)) u_xor (.x_i(x_i), .y_i(y_i), .s_o(s));

  always_ff @(posedge clk) z_q <= s;
endmodule
