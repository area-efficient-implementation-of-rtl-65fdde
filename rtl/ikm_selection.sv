// ikm_selection - selection logic of the iterative Karatsuba multiplier.
//
// For the current step it picks and combines the segments of both operands
// that form the factors of this step's partial multiplication, and produces
// the command word that tells the accumulation logic at which of the 2S-1
// segment positions the partial product is to be added. Every step uses the
// same regular structure: an AND-XOR selection over all segments, steered by a
// mask that depends only on the step number (see ikm_pkg for the schedule).
//
// Interface: a_i, b_i are the zero-padded operands (S*W bits); step_i the step
// number 0..3^log2(S)-1; x_o, y_o the W-bit factors; cmd_o the command word.
// Timing: combinational.
module ikm_selection
  import ikm_pkg::*;
#(
  parameter int unsigned S  = 4,   // segments
  parameter int unsigned W  = 64,  // segment width, partial multiplier size
  parameter int unsigned SW = 5    // width of the step number
) (
  input  logic [S*W-1:0] a_i,
  input  logic [S*W-1:0] b_i,
  input  logic [SW-1:0]  step_i,
  output logic [W-1:0]   x_o,
  output logic [W-1:0]   y_o,
  output logic [2*S-2:0] cmd_o
);
  localparam int unsigned NSTEPS = ikm_steps(S);
  localparam int unsigned IW     = $clog2(NSTEPS);

  // Per-step masks and command words, fixed at elaboration time.
  logic [S-1:0]   mask_tab [NSTEPS];
  logic [2*S-2:0] cmd_tab  [NSTEPS];
  logic [S-1:0]   mask;

  for (genvar s = 0; s < NSTEPS; s++) begin : g_tab
    assign mask_tab[s] = S'(ikm_sel_mask(s, S));
    assign cmd_tab[s]  = (2*S-1)'(ikm_cmd_word(s, S));
  end

  always_comb begin
    mask  = '0;
    cmd_o = '0;
    if (int'(step_i) < NSTEPS) begin
      mask  = mask_tab[step_i[IW-1:0]];
      cmd_o = cmd_tab[step_i[IW-1:0]];
    end
    x_o   = '0;
    y_o   = '0;
    for (int unsigned j = 0; j < S; j++) begin
      x_o ^= a_i[j*W +: W] & {W{mask[j]}};
      y_o ^= b_i[j*W +: W] & {W{mask[j]}};
    end
  end
endmodule
