// tb_aop_systolic_mult - end-to-end check of the AOP systolic multiplier in
// five configurations: m = 6 and m = 20, with one, two and four branches.
// Each instance is fed a stream of random operand pairs (including the m = 6
// example A = x + x^3 + x^5, B = x + x^2 + x^4 + x^5, product x + x^4) with
// random gaps and back-to-back runs. Every product is compared with the
// reference ring product modulo x^(m+1) + 1, and must appear exactly after
// the latency of the structure: m+2 cycles for one branch, m/2+3 for two,
// m/4+4 for four. out_valid must be low wherever no product is due.
module tb_aop_systolic_mult;
  import tb_gf_ref_pkg::*;

  localparam int NCFG = 5;
  localparam int CFG_M   [NCFG] = '{6, 6, 20, 20, 20};
  localparam int CFG_BR  [NCFG] = '{1, 2, 1, 2, 4};
  localparam int CFG_LAT [NCFG] = '{6 + 2, 6 / 2 + 3, 20 + 2, 20 / 2 + 3, 20 / 4 + 4};
  localparam int NIN = 300;

  int checks = 0, failures = 0;
  int back_to_back = 0, gaps = 0;
  int done_cnt = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int edge_no = 0;

  always #5 clk = ~clk;
  always @(posedge clk) edge_no <= edge_no + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int M   = CFG_M[g];
    localparam int BR  = CFG_BR[g];
    localparam int LAT = CFG_LAT[g];

    logic         in_valid = 1'b0, out_valid;
    logic [M:0]   a = '0, b = '0, c;
    logic [M:0]   exp_q [$];
    int           due_q [$];

    aop_systolic_mult #(.M(M), .BR(BR)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a_i(a), .b_i(b),
      .out_valid(out_valid), .c_o(c));

    // Driver: present at a falling edge, captured at the next rising edge.
    initial begin
      logic prev = 1'b0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < NIN; n++) begin
        @(negedge clk);
        in_valid = (n < 20) || ($urandom_range(0, 3) != 0);
        if (n == 0 && M == 6) begin
          a = 7'b0101010; b = 7'b0110110;
        end else begin
          a = (M+1)'($urandom()); b = (M+1)'($urandom());
        end
        if (in_valid) begin
          exp_q.push_back((M+1)'(aop_ring_mul(vec_t'(a), vec_t'(b), M)));
          due_q.push_back(edge_no + LAT - 1);
          if (prev) back_to_back++;
        end else begin
          gaps++;
        end
        prev = in_valid;
      end
      @(negedge clk);
      in_valid = 1'b0;
    end

    // Checker: after every rising edge, compare with what is due.
    initial begin
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        if (due_q.size() > 0 && due_q[0] == edge_no - 1) begin
          logic [M:0] e;
          e = exp_q.pop_front();
          void'(due_q.pop_front());
          checks++;
          if (!out_valid || c !== e) begin
            failures++;
            $display("FAIL M=%0d BR=%0d edge %0d: valid=%b got %b exp %b", M, BR, edge_no, out_valid, c, e);
          end
          if (M == 6 && e == 7'b0010010 && c !== 7'b0010010) begin
            failures++;
            $display("FAIL m=6 example");
          end
        end else begin
          checks++;
          if (out_valid) begin
            failures++;
            $display("FAIL M=%0d BR=%0d: out_valid with nothing due at edge %0d", M, BR, edge_no);
          end
        end
        if (due_q.size() == 0 && edge_no > NIN + 10) begin
          done_cnt++;
          break;
        end
      end
    end
  end

  initial begin
    wait (done_cnt == NCFG);
    checks++;
    if (back_to_back == 0 || gaps == 0) begin
      failures++;
      $display("FAIL stream had no back-to-back issue or no gap");
    end
    $display("back-to-back issues %0d, gaps %0d", back_to_back, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
