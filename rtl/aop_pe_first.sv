// aop_pe_first - PE[0] of the AOP systolic multiplier.
//
// The first processing element of every branch holds only a bit-shift cell and
// an AND cell: it forms the first partial product of each branch and registers
// it, together with the operands A0 and B for the next PE. There is no running
// sum yet, so there is no XOR cell. With BR parallel branches the BR lanes all
// read the same operand A0 (register sharing); lane k handles bit b_(k*L) of B,
// where L is the number of B bits per branch.
//
// Interface: a_i, b_i are the (M+1)-bit operands; a_q, b_q their registered
// copies; p_q[k] the registered partial product of lane k.
// Timing: one register stage; the path inside is one AND gate.
module aop_pe_first #(
  parameter int unsigned M  = 20,  // field degree m
  parameter int unsigned BR = 2,   // number of parallel branches
  parameter int unsigned L  = 11   // bits of B handled per branch, ceil((m+1)/BR)
) (
  input  logic                clk,
  input  logic [M:0]          a_i,
  input  logic [M:0]          b_i,
  output logic [M:0]          a_q,
  output logic [M:0]          b_q,
  output logic [BR-1:0][M:0]  p_q
);
  logic [BR-1:0][M:0] p_d;

  for (genvar k = 0; k < BR; k++) begin : g_lane
    localparam int unsigned IDX = k * L;
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
    p_q <= p_d;
  end
endmodule
