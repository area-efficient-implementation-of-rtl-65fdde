// tb_aop_pe - checks a regular PE for m = 6, two branches of four B bits,
// at position J = 3: lane 0 handles bit 3, lane 1 would handle bit 7, which
// does not exist and must give a zero product. After each clock edge the PE
// must hold the running sums c ^ p and the new partial products, and pass the
// shared operand registers on.
module tb_aop_pe;
  import tb_gf_ref_pkg::*;
  localparam int unsigned M = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [M:0] a, b, aq, bq;
  logic [1:0][M:0] c, p, cq, pq;
  logic [1:0][M:0] j1_cq, j1_pq;
  logic [M:0] j1_aq, j1_bq;

  always #5 clk = ~clk;

  aop_pe #(.M(M), .BR(2), .L(4), .J(3)) u_dut (
    .clk(clk), .a_i(a), .b_i(b), .c_i(c), .p_i(p), .a_q(aq), .b_q(bq), .c_q(cq), .p_q(pq));
  aop_pe #(.M(M), .BR(2), .L(4), .J(1)) u_dut_j1 (
    .clk(clk), .a_i(a), .b_i(b), .c_i(c), .p_i(p), .a_q(j1_aq), .b_q(j1_bq), .c_q(j1_cq), .p_q(j1_pq));

  function automatic logic [M:0] lane_ref(input logic [M:0] av, input logic [M:0] bv, input int idx);
    vec_t xi;
    xi = '0;
    if (idx <= int'(M)) xi[idx] = bv[idx];
    return (M+1)'(aop_ring_mul(vec_t'(av), xi, M));
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      a = (M+1)'($urandom()); b = (M+1)'($urandom());
      c = 14'($urandom()); p = 14'($urandom());
      @(posedge clk); #1;
      checks += 2;
      if (aq !== a || bq !== b) begin failures++; $display("FAIL operands"); end
      if (j1_aq !== a || j1_bq !== b) begin failures++; $display("FAIL operands J1"); end
      for (int k = 0; k < 2; k++) begin
        checks += 4;
        if (cq[k] !== (c[k] ^ p[k])) begin failures++; $display("FAIL sum lane %0d", k); end
        if (j1_cq[k] !== (c[k] ^ p[k])) begin failures++; $display("FAIL sum J1 lane %0d", k); end
        if (pq[k] !== lane_ref(a, b, 4 * k + 3)) begin
          failures++; $display("FAIL product lane %0d got %b", k, pq[k]);
        end
        if (j1_pq[k] !== lane_ref(a, b, 4 * k + 1)) begin
          failures++; $display("FAIL product J1 lane %0d got %b", k, j1_pq[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
