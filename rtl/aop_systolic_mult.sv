// aop_systolic_mult - low-latency, register-sharing systolic multiplier over
// GF(2^m) defined by the all-one polynomial P(x) = 1 + x + ... + x^m (AOP).
//
// Operands and result use the extended (m+1)-bit representation: bit k is the
// coefficient of x^k, and the product is formed modulo x^(m+1) + 1, a multiple
// of P(x). Modular reduction by x is then a plain rotation (gf_bsc), so
//     C = sum_{i=0..m} b_i * (A * x^i mod x^(m+1) + 1).
// The result is congruent to A*B modulo P(x); the m-bit canonical value, if
// wanted, is c_k ^ c_m for k < m.
//
// Structure. The m+1 bits of B are split into BR parallel branches of
// L = ceil((m+1)/BR) bits each; branch k handles bits k*L ... k*L+L-1. Branch
// stages are PE[0] (AND only), PE[1..L-1] (regular: AND and XOR working in the
// same cycle on different data, after cut-set retiming) and a final XOR stage
// (an aop_adder_cell per branch). The branches run in lock step and share one
// chain of operand registers for A0 and B. A tree of log2(BR) levels of adder
// cells (AC) sums the branch results.
//   BR = 1: the basic systolic design, m+2 PEs, latency m+2 cycles.
//   BR = 2: the low-latency register-sharing design, m/2+2 PEs and one AC,
//           latency m/2+3 cycles (the default).
//   BR = 4: the improved low-latency design with merged arrays, latency m/4+4.
// A new operand pair can enter every clock cycle; the critical path is one
// XOR gate.
//
// Interface: in_valid/a_i/b_i enter a product; LATENCY cycles later out_valid
// and c_o present it. rst_n (active low, synchronous) clears only the valid
// pipeline; the data registers need no reset. The valid pipeline is this
// design's own addition, to mark which outputs are products.
module aop_systolic_mult #(
  parameter int unsigned M  = 20,  // field degree m
  parameter int unsigned BR = 2    // parallel branches, a power of two
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [M:0] a_i,
  input  logic [M:0] b_i,
  output logic       out_valid,
  output logic [M:0] c_o
);
  localparam int unsigned L       = (M + BR) / BR;  // ceil((M+1)/BR)
  localparam int unsigned K       = $clog2(BR);     // AC tree levels
  localparam int unsigned LATENCY = L + 1 + K;

  if ((BR & (BR - 1)) != 0 || BR == 0) begin : g_bad_br
    $error("aop_systolic_mult: BR must be a power of two");
  end

  // Stage s signals are the registered outputs of PE[s-1].
  logic [M:0]         a_s [1:L];
  logic [M:0]         b_s [1:L];
  logic [BR-1:0][M:0] c_s [1:L];
  logic [BR-1:0][M:0] p_s [1:L];

  aop_pe_first #(.M(M), .BR(BR), .L(L)) u_pe0 (
    .clk(clk), .a_i(a_i), .b_i(b_i), .a_q(a_s[1]), .b_q(b_s[1]), .p_q(p_s[1])
  );
  assign c_s[1] = '0;  // no running sum before the first XOR stage

  for (genvar j = 1; j < L; j++) begin : g_pe
    aop_pe #(.M(M), .BR(BR), .L(L), .J(j)) u_pe (
      .clk(clk),
      .a_i(a_s[j]), .b_i(b_s[j]), .c_i(c_s[j]), .p_i(p_s[j]),
      .a_q(a_s[j+1]), .b_q(b_s[j+1]), .c_q(c_s[j+1]), .p_q(p_s[j+1])
    );
  end

  // Final XOR stage of each branch, then the AC tree.
  logic [M:0] tree [0:K][BR];

  for (genvar k = 0; k < BR; k++) begin : g_last
    aop_adder_cell #(.M(M)) u_last (
      .clk(clk), .x_i(c_s[L][k]), .y_i(p_s[L][k]), .z_q(tree[0][k])
    );
  end

  for (genvar t = 1; t <= K; t++) begin : g_lvl
    for (genvar k = 0; k < (BR >> t); k++) begin : g_ac
      aop_adder_cell #(.M(M)) u_ac (
        .clk(clk), .x_i(tree[t-1][2*k]), .y_i(tree[t-1][2*k+1]), .z_q(tree[t][k])
      );
    end
    for (genvar k = (BR >> t); k < BR; k++) begin : g_unused
      assign tree[t][k] = '0;
    end
  end

  assign c_o = tree[K][0];

  // Valid pipeline, LATENCY stages.
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];
endmodule
