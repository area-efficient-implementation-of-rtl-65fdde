// tb_ikm_multiplier - runs the sequential Karatsuba multiplier in all nine
// configurations of the B-163 / B-233 / B-571 table: 2, 4 and 8 segments for
// each field. Every product is compared with the schoolbook product reduced
// by long division, and done must come exactly 3, 9 or 27 cycles after the
// start was taken. A second start raised while the multiplier is busy must be
// ignored without disturbing the running product.
module tb_ikm_multiplier;
  import tb_gf_ref_pkg::*;

  localparam int NCFG = 9;
  localparam int CFG_M  [NCFG] = '{163, 163, 163, 233, 233, 233, 571, 571, 571};
  localparam int CFG_S  [NCFG] = '{2, 4, 8, 2, 4, 8, 2, 4, 8};
  localparam int CFG_W  [NCFG] = '{96, 48, 24, 128, 64, 32, 320, 160, 80};
  localparam int CFG_CY [NCFG] = '{3, 9, 27, 3, 9, 27, 3, 9, 27};
  localparam int NMUL = 8;

  int checks = 0, failures = 0;
  int done_cnt = 0, ignored_starts = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int M  = CFG_M[g];
    localparam int S  = CFG_S[g];
    localparam int W  = CFG_W[g];
    localparam int CY = CFG_CY[g];
    localparam logic [M:0] POLY =
        (M == 163) ? ((M+1)'(1) << 163 | (M+1)'(1) << 7 | (M+1)'(1) << 6 | (M+1)'(1) << 3 | (M+1)'(1)) :
        (M == 233) ? ((M+1)'(1) << 233 | (M+1)'(1) << 74 | (M+1)'(1)) :
                     ((M+1)'(1) << 571 | (M+1)'(1) << 10 | (M+1)'(1) << 5 | (M+1)'(1) << 2 | (M+1)'(1));

    logic         start = 1'b0, busy, done;
    logic [M-1:0] a = '0, b = '0, c;

    ikm_multiplier #(.M(M), .S(S), .W(W), .POLY(POLY)) u_dut (
      .clk(clk), .rst_n(rst_n), .start_i(start), .a_i(a), .b_i(b),
      .busy_o(busy), .done_o(done), .c_o(c));

    initial begin
      vec_t f, ea, eb;
      logic [M-1:0] exp_c;
      int cyc;
      f = vec_t'(POLY);
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < NMUL; n++) begin
        @(negedge clk);
        ea = rand_vec(M); eb = rand_vec(M);
        if (n == 0) begin ea = '0; ea[0] = 1'b1; end            // a = 1
        if (n == 1) begin ea = '0; ea[M-1] = 1'b1; eb = '0; eb[1] = 1'b1; end  // x^(M-1) * x
        if (n == 2) begin ea = '0; eb = '0; ea[M-1:0] = '1; eb[M-1:0] = '1; end
        a = M'(ea); b = M'(eb);
        exp_c = M'(polymod(clmul(ea, eb, M), f, M));
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        checks++;
        if (!busy) begin failures++; $display("FAIL M=%0d S=%0d: not busy after start", M, S); end
        cyc = 0;
        while (!done && cyc < 100) begin
          if (cyc == 0 && CY > 1) begin
            // A start while busy must be ignored.
            a = ~a; b = ~b; start = 1'b1;
            ignored_starts++;
          end else begin
            start = 1'b0;
          end
          @(negedge clk);
          cyc++;
        end
        start = 1'b0;
        checks += 3;
        if (cyc != CY) begin failures++; $display("FAIL M=%0d S=%0d: done after %0d cycles, want %0d", M, S, cyc, CY); end
        if (busy) begin failures++; $display("FAIL M=%0d S=%0d: busy with done", M, S); end
        if (c !== exp_c) begin failures++; $display("FAIL M=%0d S=%0d product %0d", M, S, n); end
        @(negedge clk);
        checks++;
        if (done || c !== exp_c) begin failures++; $display("FAIL M=%0d S=%0d: done not a pulse or result lost", M, S); end
      end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == NCFG);
    checks++;
    if (ignored_starts == 0) begin failures++; $display("FAIL no start while busy was tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
