// ikm_accumulator - accumulation logic of the IKM with embedded reduction.
//
// Adds each partial product into the running result at every segment position
// selected by the command word (bit p: shifted by p*W bits), and reduces the
// sum modulo the field polynomial f(x) in the same cycle. Because the result
// is brought back below x^M after every step, the upper half of the long
// product (segment positions S..2S-1) is never stored: only M <= S*W result
// bits are kept in flip-flops. The reduction is a generic shift-and-XOR over
// the bits M .. 2*S*W-2 of the unreduced sum, valid for any f; for a trinomial
// or pentanomial it collapses to a few XOR levels.
//
// Interface: clr_i clears the result, en_i adds p_i at the positions of cmd_i
// (clr_i has priority); acc_q is the reduced result (M bits).
// Timing: one register stage; the result of a step is visible the cycle after.
module ikm_accumulator #(
  parameter int unsigned M          = 233,  // field degree
  parameter int unsigned S          = 4,    // segments
  parameter int unsigned W          = 64,   // segment width
  parameter logic [M:0]  POLY       = (M+1)'(1) << M | (M+1)'(1) << 74 | (M+1)'(1)
) (
  input  logic           clk,
  input  logic           clr_i,
  input  logic           en_i,
  input  logic [2*W-2:0] p_i,
  input  logic [2*S-2:0] cmd_i,
  output logic [M-1:0]   acc_q
);
  localparam int unsigned VW = 2 * S * W - 1;  // width of the unreduced sum

  logic [VW-1:0] v;
  logic [M-1:0]  acc_d;

  always_comb begin
    v = VW'(acc_q);
    for (int unsigned p = 0; p < 2 * S - 1; p++) begin
      if (cmd_i[p]) v[p*W +: 2*W-1] ^= p_i;
    end
    for (int i = VW - 1; i >= int'(M); i--) begin
      if (v[i]) v[i-M +: M+1] ^= POLY;
    end
    acc_d = v[M-1:0];
  end

  always_ff @(posedge clk) begin
    if (clr_i)     acc_q <= '0;
    else if (en_i) acc_q <= acc_d;
  end
endmodule
