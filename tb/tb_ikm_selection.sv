// tb_ikm_selection - checks the selection logic through the Karatsuba
// identity: for 2, 4 and 8 segments of 8 bits, adding the product of the
// selected factors of every step at every position of its command word must
// give exactly the full product of the two operands. For four segments the
// step schedule is also compared with the explicit two-level Karatsuba
// table (9 steps, 7-bit command words).
module tb_ikm_selection;
  import tb_gf_ref_pkg::*;
  localparam int W = 8;

  int checks = 0, failures = 0;
  int done_cnt = 0;

  // Four segments: the explicit table. Step s = 3*d1 + d0, d = 0 low,
  // 1 high, 2 sum of halves; mask bit j selects segment j.
  localparam logic [3:0] MASK4 [9] = '{4'b0001, 4'b0010, 4'b0011,
                                       4'b0100, 4'b1000, 4'b1100,
                                       4'b0101, 4'b1010, 4'b1111};
  localparam logic [6:0] CMD4 [9]  = '{7'b0001111, 7'b0011110, 7'b0001010,
                                       7'b0111100, 7'b1111000, 7'b0101000,
                                       7'b0001100, 7'b0011000, 7'b0001000};

  for (genvar g = 0; g < 3; g++) begin : g_cfg
    localparam int S  = 2 << g;
    localparam int NS = (g == 0) ? 3 : (g == 1) ? 9 : 27;
    logic [S*W-1:0] a, b;
    logic [4:0]     step;
    logic [W-1:0]   x, y;
    logic [2*S-2:0] cmd;

    ikm_selection #(.S(S), .W(W), .SW(5)) u_dut (
      .a_i(a), .b_i(b), .step_i(step), .x_o(x), .y_o(y), .cmd_o(cmd));

    initial begin
      #(g * 100000 + 1);
      for (int t = 0; t < 40; t++) begin
        vec_t acc, full;
        acc = '0;
        a = (S*W)'(rand_vec(S * W));
        b = (S*W)'(rand_vec(S * W));
        for (int s = 0; s < NS; s++) begin
          logic [S-1:0] m;
          logic [W-1:0] ex, ey;
          step = 5'(s);
          #1;
          for (int p = 0; p < 2 * S - 1; p++)
            if (cmd[p]) acc = acc ^ (clmul(vec_t'(x), vec_t'(y), W) << (p * W));
          if (S == 4) begin
            m = S'(MASK4[s]);
            ex = '0; ey = '0;
            for (int j = 0; j < S; j++) if (m[j]) begin
              ex ^= a[j*W +: W]; ey ^= b[j*W +: W];
            end
            checks++;
            if (x !== ex || y !== ey || cmd !== (2*S-1)'(CMD4[s])) begin
              failures++; $display("FAIL S=4 step %0d cmd=%b", s, cmd);
            end
          end
        end
        full = clmul(vec_t'(a), vec_t'(b), S * W);
        checks++;
        if (acc !== full) begin
          failures++; $display("FAIL S=%0d Karatsuba identity", S);
        end
      end
      done_cnt++;
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done_cnt == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
