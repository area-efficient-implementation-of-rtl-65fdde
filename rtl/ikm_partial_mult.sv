// ikm_partial_mult - combinational partial multiplier of the IKM.
//
// Multiplies two W-bit polynomials over GF(2) (carry-less multiplication) in
// one clock cycle, giving a 2W-1 bit product. It is a hybrid Karatsuba
// multiplier. Each Karatsuba level splits an operand of width Wd into a low
// half of H = ceil(Wd/2) bits and a high half (zero-extended to H bits),
// x = x1*x^H + x0, and forms three half-size products
//     x*y = P0 + (P0 + P1 + Pm)*x^H + P1*x^2H,
//     P0 = x0*y0,  P1 = x1*y1,  Pm = (x0+x1)*(y0+y1).
// Levels are added until the width is at most THRESH bits (3^LV leaves); the
// leaves are plain schoolbook arrays (Wd gated, shifted copies XORed), which
// are smaller than further levels for short operands. The tree is unrolled
// with generate loops: level d holds 3^d operand pairs and products, node n
// of level d has children 3n (low), 3n+1 (high) and 3n+2 (middle).
// The threshold is this design's choice.
//
// Interface: x_i, y_i (W bits) -> p_o (2W-1 bits).
// Timing: combinational.
module ikm_partial_mult #(
  parameter int unsigned W      = 64,  // operand width
  parameter int unsigned THRESH = 16   // largest width built as a schoolbook array
) (
  input  logic [W-1:0]   x_i,
  input  logic [W-1:0]   y_i,
  output logic [2*W-2:0] p_o
);
  // Operand width at level d.
  function automatic int unsigned lvl_w(input int unsigned d);
    int unsigned w = W;
    for (int unsigned i = 0; i < d; i++) w = (w + 1) / 2;
    return w;
  endfunction

  // Number of Karatsuba levels.
  function automatic int unsigned n_lvl();
    int unsigned w = W;
    int unsigned d = 0;
    while (w > THRESH && w >= 2) begin
      w = (w + 1) / 2;
      d++;
    end
    return d;
  endfunction

  function automatic int unsigned pow3(input int unsigned d);
    int unsigned n = 1;
    for (int unsigned i = 0; i < d; i++) n = n * 3;
    return n;
  endfunction

  localparam int unsigned LV = n_lvl();

  for (genvar d = 0; d <= LV; d++) begin : g_lvl
    localparam int unsigned WD = lvl_w(d);
    logic [WD-1:0]   xs [pow3(d)];
    logic [WD-1:0]   ys [pow3(d)];
    logic [2*WD-2:0] ps [pow3(d)];
  end

  assign g_lvl[0].xs[0] = x_i;
  assign g_lvl[0].ys[0] = y_i;
  assign p_o            = g_lvl[0].ps[0];

  // Split operands downwards and combine products upwards.
  for (genvar d = 0; d < LV; d++) begin : g_split
    localparam int unsigned WD = lvl_w(d);
    localparam int unsigned H  = lvl_w(d + 1);
    for (genvar n = 0; n < pow3(d); n++) begin : g_node
      logic [H-1:0]    x0, x1, y0, y1;
      logic [2*H-2:0]  s;
      logic [2*WD-2:0] mid, hi;
      assign x0 = g_lvl[d].xs[n][H-1:0];
      assign y0 = g_lvl[d].ys[n][H-1:0];
      assign x1 = H'(g_lvl[d].xs[n][WD-1:H]);  // WD-H <= H bits, zero-extended
      assign y1 = H'(g_lvl[d].ys[n][WD-1:H]);
      assign g_lvl[d+1].xs[3*n]     = x0;
      assign g_lvl[d+1].ys[3*n]     = y0;
      assign g_lvl[d+1].xs[3*n + 1] = x1;
      assign g_lvl[d+1].ys[3*n + 1] = y1;
      assign g_lvl[d+1].xs[3*n + 2] = x0 ^ x1;
      assign g_lvl[d+1].ys[3*n + 2] = y0 ^ y1;
      // P1 has at most 2(WD-H)-1 significant bits, so the bits the shifts
      // drop are zero and every term fits in 2WD-1 bits.
      assign s   = g_lvl[d+1].ps[3*n] ^ g_lvl[d+1].ps[3*n + 1] ^ g_lvl[d+1].ps[3*n + 2];
      assign mid = (2*WD-1)'(s);
      assign hi  = (2*WD-1)'(g_lvl[d+1].ps[3*n + 1]);
      assign g_lvl[d].ps[n] = (2*WD-1)'(g_lvl[d+1].ps[3*n]) ^ (mid << H) ^ (hi << (2 * H));
    end
  end

  // Schoolbook leaves.
  for (genvar n = 0; n < pow3(LV); n++) begin : g_leaf
    localparam int unsigned WL = lvl_w(LV);
    always_comb begin
      g_lvl[LV].ps[n] = '0;
      for (int unsigned i = 0; i < WL; i++) begin
        g_lvl[LV].ps[n][i +: WL] ^= g_lvl[LV].xs[n] & {WL{g_lvl[LV].ys[n][i]}};
      end
    end
  end
endmodule
