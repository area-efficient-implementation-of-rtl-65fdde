// ikm_multiplier - sequential GF(2^M) multiplier built on the iterative
// Karatsuba method (IKM) with embedded reduction.
//
// The zero-padded operands are cut into S segments of W bits. One small
// combinational W x W multiplier is used 3^log2(S) times (9 times for four
// segments): each cycle the selection logic forms the factors of one Karatsuba
// partial product, the partial multiplier multiplies them, and the
// accumulation logic adds the product at the positions given by the command
// word and reduces modulo f(x) at once, so only the M-bit result is stored.
// The default, M = 233 with f(x) = x^233 + x^74 + 1 (the NIST B-233 field),
// four segments and a 64-bit partial multiplier, needs nine cycles per
// product; 2 or 8 segments trade area for 3 or 27 cycles.
//
// Interface: start_i (one cycle, ignored while busy) captures a_i and b_i;
// busy_o is high during the steps; done_o pulses for one cycle when c_o holds
// a*b mod f(x). c_o keeps its value until the next start.
// Timing: done_o rises 3^log2(S) cycles after the cycle in which start_i was
// sampled. rst_n is an active-low synchronous reset of the control state.
module ikm_multiplier
  import ikm_pkg::*;
#(
  parameter int unsigned M    = 233,  // field degree
  parameter int unsigned S    = 4,    // segments, a power of two
  parameter int unsigned W    = 64,   // partial multiplier width, S*W >= M
  parameter logic [M:0]  POLY = (M+1)'(1) << M | (M+1)'(1) << 74 | (M+1)'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [M-1:0] a_i,
  input  logic [M-1:0] b_i,
  output logic         busy_o,
  output logic         done_o,
  output logic [M-1:0] c_o
);
  localparam int unsigned NSTEPS = ikm_steps(S);
  localparam int unsigned SW     = $clog2(NSTEPS + 1);

  if (S * W < M || S > MAX_SEG || (S & (S - 1)) != 0) begin : g_bad_cfg
    $error("ikm_multiplier: need S a power of two, S <= MAX_SEG and S*W >= M");
  end

  logic [S*W-1:0] a_q, b_q;
  logic [SW-1:0]  step_q;
  logic           start_ok;
  logic [W-1:0]   x, y;
  logic [2*W-2:0] p;
  logic [2*S-2:0] cmd;

  assign start_ok = start_i && !busy_o;

  // Control: operand registers and step counter.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_o <= 1'b0;
      done_o <= 1'b0;
      step_q <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_ok) begin
        busy_o <= 1'b1;
        step_q <= '0;
      end else if (busy_o) begin
        if (step_q == SW'(NSTEPS - 1)) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end
        step_q <= step_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start_ok) begin
      a_q <= (S*W)'(a_i);
      b_q <= (S*W)'(b_i);
    end
  end

  ikm_selection #(.S(S), .W(W), .SW(SW)) u_sel (
    .a_i(a_q), .b_i(b_q), .step_i(step_q), .x_o(x), .y_o(y), .cmd_o(cmd)
  );

  ikm_partial_mult #(.W(W)) u_mul (.x_i(x), .y_i(y), .p_o(p));

  ikm_accumulator #(.M(M), .S(S), .W(W), .POLY(POLY)) u_acc (
    .clk(clk), .clr_i(start_ok), .en_i(busy_o), .p_i(p), .cmd_i(cmd), .acc_q(c_o)
  );
endmodule
