// ikm_pkg - schedule of the iterative Karatsuba multiplier (IKM).
//
// An operand of S = 2^K segments of W bits is multiplied with K levels of
// Karatsuba splitting, giving 3^K partial products of W x W bits that are
// formed one per clock cycle. Step s is written in base 3 with digits d_l,
// l = 0..K-1; digit l decides how level l (half size h = 2^l segments) is
// split:
//   d_l = 0  low halves,  the product is placed at z^0 and z^h
//   d_l = 1  high halves, placed at z^h and z^2h
//   d_l = 2  sum of both halves (the Karatsuba middle term), placed at z^h
// with z = x^W. The operand of a step is therefore the XOR of all segments j
// whose index bit l equals d_l wherever d_l < 2, and the positions are the
// GF(2) product of the per-level factors. For S = 4 there are 9 steps and
// 2S-1 = 7 positions, each named by one bit of the command word.
package ikm_pkg;

  localparam int unsigned MAX_SEG = 32;

  // Number of partial multiplications for S segments: 3^log2(S).
  function automatic int unsigned ikm_steps(input int unsigned s);
    int unsigned n = 1;
    for (int unsigned h = 1; h < s; h = h * 2) n = n * 3;
    return n;
  endfunction

  // Segments whose XOR forms the operand of the given step.
  function automatic logic [MAX_SEG-1:0] ikm_sel_mask(input int unsigned step,
                                                      input int unsigned s);
    logic [MAX_SEG-1:0] mask = '0;
    for (int unsigned j = 0; j < s; j++) begin
      int unsigned rem = step;
      bit          take = 1'b1;
      for (int unsigned h = 1; h < s; h = h * 2) begin
        int unsigned d = rem % 3;
        rem = rem / 3;
        if (d != 2 && ((j & h) != 0) != (d == 1)) take = 1'b0;
      end
      mask[j] = take;
    end
    return mask;
  endfunction

  // Command word: bit p set means the partial product is added at x^(p*W).
  function automatic logic [2*MAX_SEG-2:0] ikm_cmd_word(input int unsigned step,
                                                        input int unsigned s);
    logic [2*MAX_SEG-2:0] poly = 1;
    int unsigned rem = step;
    for (int unsigned h = 1; h < s; h = h * 2) begin
      int unsigned d = rem % 3;
      rem = rem / 3;
      case (d)
        0:       poly = poly ^ (poly << h);
        1:       poly = (poly << h) ^ (poly << (2 * h));
        default: poly = poly << h;
      endcase
    end
    return poly;
  endfunction

endpackage
