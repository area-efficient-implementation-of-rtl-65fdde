// gf2m_multipliers_top - the two GF(2^m) multipliers side by side.
//
// aop_*: the low-latency register-sharing systolic multiplier for the
//   all-one-polynomial field of degree AOP_M (default m = 20, two branches):
//   one product per cycle in the extended (m+1)-bit representation, latency
//   m/2+3 cycles.
// ikm_*: the sequential iterative Karatsuba multiplier with embedded reduction
//   for GF(2^233), f(x) = x^233 + x^74 + 1, four 64-bit segments, nine cycles
//   per product.
// The two share only the clock and reset; see each module for its interface
// and timing.
module gf2m_multipliers_top #(
  parameter int unsigned AOP_M  = 20,
  parameter int unsigned AOP_BR = 2,
  parameter int unsigned IKM_M  = 233,
  parameter int unsigned IKM_S  = 4,
  parameter int unsigned IKM_W  = 64,
  parameter logic [IKM_M:0] IKM_POLY =
      (IKM_M+1)'(1) << IKM_M | (IKM_M+1)'(1) << 74 | (IKM_M+1)'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // AOP systolic multiplier
  input  logic             aop_in_valid,
  input  logic [AOP_M:0]   aop_a,
  input  logic [AOP_M:0]   aop_b,
  output logic             aop_out_valid,
  output logic [AOP_M:0]   aop_c,
  // iterative Karatsuba multiplier
  input  logic             ikm_start,
  input  logic [IKM_M-1:0] ikm_a,
  input  logic [IKM_M-1:0] ikm_b,
  output logic             ikm_busy,
  output logic             ikm_done,
  output logic [IKM_M-1:0] ikm_c
);
  aop_systolic_mult #(.M(AOP_M), .BR(AOP_BR)) u_aop (
    .clk(clk), .rst_n(rst_n), .in_valid(aop_in_valid), .a_i(aop_a), .b_i(aop_b),
    .out_valid(aop_out_valid), .c_o(aop_c)
  );

  ikm_multiplier #(.M(IKM_M), .S(IKM_S), .W(IKM_W), .POLY(IKM_POLY)) u_ikm (
    .clk(clk), .rst_n(rst_n), .start_i(ikm_start), .a_i(ikm_a), .b_i(ikm_b),
    .busy_o(ikm_busy), .done_o(ikm_done), .c_o(ikm_c)
  );
endmodule
