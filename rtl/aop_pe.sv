// aop_pe - regular PE (PE[J], 1 <= J < L) of the AOP systolic multiplier.
//
// Each lane holds a bit-shift cell, an AND cell and an XOR cell. Thanks to the
// cut-set retiming the three work side by side on different data in the same
// cycle: the XOR cell adds the partial product registered by the previous PE
// into the running sum, while the AND cell forms the next partial product
// b_idx * (A0 * x^idx), idx = k*L + J for lane k. Both results are registered,
// so the longest path is a single XOR (or AND) gate. All BR lanes share one
// copy of the operand registers A0 and B (register sharing between branches).
// Lanes whose bit index exceeds m form no product.
//
// Interface: a_i, b_i operands from the previous PE; c_i[k], p_i[k] running
// sum and partial product of lane k from the previous PE; *_q the same,
// registered, for the next PE.
// Timing: one register stage; one XOR delay.
module aop_pe #(
  parameter int unsigned M  = 20,  // field degree m
  parameter int unsigned BR = 2,   // number of parallel branches
  parameter int unsigned L  = 11,  // bits of B handled per branch
  parameter int unsigned J  = 1    // position of this PE inside its branch
) (
  input  logic                clk,
  input  logic [M:0]          a_i,
  input  logic [M:0]          b_i,
  input  logic [BR-1:0][M:0]  c_i,
  input  logic [BR-1:0][M:0]  p_i,
  output logic [M:0]          a_q,
  output logic [M:0]          b_q,
  output logic [BR-1:0][M:0]  c_q,
  output logic [BR-1:0][M:0]  p_q
);
  logic [BR-1:0][M:0] p_d, c_d;

  for (genvar k = 0; k < BR; k++) begin : g_lane
    localparam int unsigned IDX = k * L + J;
    gf_xor_cell #(.M(M)) u_xor (.x_i(c_i[k]), .y_i(p_i[k]), .s_o(c_d[k]));
    if (IDX <= M) begin : g_act
      logic [M:0] a_sh;
      gf_bsc      #(.M(M), .SHIFT(IDX)) u_bsc (.a_i(a_i), .a_o(a_sh));
      gf_and_cell #(.M(M))              u_and (.b_i(b_i[IDX]), .a_i(a_sh), .p_o(p_d[k]));
    end else begin : g_idle
      always_comb p_d[k] = '0;
    end
  end

  always_ff @(posedge clk) begin
    a_q <= a_i;
    b_q <= b_i;
    c_q <= c_d;
    p_q <= p_d;
  end
endmodule
