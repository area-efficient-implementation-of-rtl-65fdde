// tb_gf2m_multipliers_top - end-to-end test of the top at its default sizes:
// the m = 20 two-branch AOP systolic multiplier and the 233-bit four-segment
// Karatsuba multiplier run at the same time.
// AOP side: a random stream with back-to-back operands and gaps; every product
// must match the reference ring product and arrive m/2+3 = 13 cycles after it
// entered. IKM side: a series of multiplications in GF(2^233); each must
// finish nine cycles after its start, and starts raised while busy must be
// ignored. Each mechanism (back-to-back issue, gap, ignored start, finished
// product) is counted and must occur at least once.
module tb_gf2m_multipliers_top;
  import tb_gf_ref_pkg::*;

  localparam int AM = 20, AOP_LAT = AM / 2 + 3;
  localparam int IM = 233, IKM_CY = 9;
  localparam int NAOP = 400, NIKM = 20;

  int checks = 0, failures = 0;
  int n_b2b = 0, n_gap = 0, n_ign = 0, n_ikm_done = 0, n_aop_out = 0;
  int fin = 0;
  int edge_no = 0;
  logic clk = 1'b0, rst_n = 1'b0;

  logic          aop_in_valid = 1'b0, aop_out_valid;
  logic [AM:0]   aop_a = '0, aop_b = '0, aop_c;
  logic          ikm_start = 1'b0, ikm_busy, ikm_done;
  logic [IM-1:0] ikm_a = '0, ikm_b = '0, ikm_c;

  always #5 clk = ~clk;
  always @(posedge clk) edge_no <= edge_no + 1;

  gf2m_multipliers_top u_dut (
    .clk(clk), .rst_n(rst_n),
    .aop_in_valid(aop_in_valid), .aop_a(aop_a), .aop_b(aop_b),
    .aop_out_valid(aop_out_valid), .aop_c(aop_c),
    .ikm_start(ikm_start), .ikm_a(ikm_a), .ikm_b(ikm_b),
    .ikm_busy(ikm_busy), .ikm_done(ikm_done), .ikm_c(ikm_c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AOP stream.
  logic [AM:0] aexp_q [$];
  int          adue_q [$];

  initial begin
    logic prev = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NAOP; n++) begin
      @(negedge clk);
      aop_in_valid = (n < 10) || ($urandom_range(0, 2) != 0);
      aop_a = (AM+1)'($urandom());
      aop_b = (AM+1)'($urandom());
      if (aop_in_valid) begin
        aexp_q.push_back((AM+1)'(aop_ring_mul(vec_t'(aop_a), vec_t'(aop_b), AM)));
        adue_q.push_back(edge_no + AOP_LAT - 1);
        if (prev) n_b2b++;
      end else n_gap++;
      prev = aop_in_valid;
    end
    @(negedge clk);
    aop_in_valid = 1'b0;
  end

  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      checks++;
      if (adue_q.size() > 0 && adue_q[0] == edge_no - 1) begin
        logic [AM:0] e;
        e = aexp_q.pop_front();
        void'(adue_q.pop_front());
        n_aop_out++;
        if (!aop_out_valid || aop_c !== e) begin
          failures++; $display("FAIL AOP edge %0d got %h exp %h", edge_no, aop_c, e);
        end
      end else if (aop_out_valid) begin
        failures++; $display("FAIL AOP out_valid with nothing due");
      end
      if (adue_q.size() == 0 && edge_no > NAOP + 10) break;
    end
    fin++;
  end

  // IKM sequence.
  initial begin
    vec_t f, ea, eb;
    logic [IM-1:0] exp_c;
    int cyc;
    f = '0; f[233] = 1'b1; f[74] = 1'b1; f[0] = 1'b1;
    @(posedge rst_n);
    for (int n = 0; n < NIKM; n++) begin
      @(negedge clk);
      ea = rand_vec(IM); eb = rand_vec(IM);
      ikm_a = IM'(ea); ikm_b = IM'(eb);
      exp_c = IM'(polymod(clmul(ea, eb, IM), f, IM));
      ikm_start = 1'b1;
      @(negedge clk);
      ikm_start = 1'b0;
      cyc = 0;
      while (!ikm_done && cyc < 50) begin
        if (cyc == 3 + (n % 4)) begin
          ikm_start = 1'b1; ikm_a = ~ikm_a;
          n_ign++;
        end else ikm_start = 1'b0;
        @(negedge clk);
        cyc++;
      end
      ikm_start = 1'b0;
      checks += 2;
      if (cyc != IKM_CY) begin failures++; $display("FAIL IKM took %0d cycles", cyc); end
      if (ikm_c !== exp_c) begin failures++; $display("FAIL IKM product %0d", n); end
      else n_ikm_done++;
    end
    fin++;
  end

  initial begin
    wait (fin == 2);
    $display("AOP products %0d, back-to-back %0d, gaps %0d; IKM products %0d, ignored starts %0d",
             n_aop_out, n_b2b, n_gap, n_ikm_done, n_ign);
    checks += 5;
    if (n_aop_out == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_ikm_done == 0) failures++;
    if (n_ign == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
