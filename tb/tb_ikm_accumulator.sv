// tb_ikm_accumulator - checks the accumulation logic with embedded reduction
// for GF(2^233), f = x^233 + x^74 + 1, four 64-bit segments, and for
// GF(2^163), f = x^163 + x^7 + x^6 + x^3 + 1, four 48-bit segments. Random
// partial products are added at random sets of positions; the register must
// always equal the long (unreduced) sum of everything added since the last
// clear, reduced modulo f by long division. Holding (en low) and clearing are
// checked too.
module tb_ikm_accumulator;
  import tb_gf_ref_pkg::*;

  int checks = 0, failures = 0;
  int done_cnt = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int M = (g == 0) ? 233 : 163;
    localparam int S = 4;
    localparam int W = (g == 0) ? 64 : 48;
    localparam logic [M:0] POLY = (g == 0)
        ? ((M+1)'(1) << 233 | (M+1)'(1) << 74 | (M+1)'(1))
        : ((M+1)'(1) << 163 | (M+1)'(1) << 7 | (M+1)'(1) << 6 | (M+1)'(1) << 3 | (M+1)'(1));

    logic           clr = 1'b1, en = 1'b0;
    logic [2*W-2:0] p = '0;
    logic [2*S-2:0] cmd = '0;
    logic [M-1:0]   acc;

    ikm_accumulator #(.M(M), .S(S), .W(W), .POLY(POLY)) u_dut (
      .clk(clk), .clr_i(clr), .en_i(en), .p_i(p), .cmd_i(cmd), .acc_q(acc));

    initial begin
      vec_t sum, f;
      f = vec_t'(POLY);
      sum = '0;
      @(negedge clk);
      for (int t = 0; t < 300; t++) begin
        clr = (t % 40 == 0);
        en  = ($urandom_range(0, 4) != 0);
        p   = (2*W-1)'(rand_vec(2 * W - 1));
        cmd = (2*S-1)'($urandom());
        if (t % 40 == 1) cmd = '1;  // every position at once
        if (clr) sum = '0;
        else if (en)
          for (int k = 0; k < 2 * S - 1; k++)
            if (cmd[k]) sum = sum ^ (vec_t'(p) << (k * W));
        @(negedge clk);
        checks++;
        if (acc !== M'(polymod(sum, f, M))) begin
          failures++; $display("FAIL M=%0d step %0d", M, t);
        end
      end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
