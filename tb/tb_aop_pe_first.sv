// tb_aop_pe_first - checks PE[0] for m = 6 with two branches (lanes at B bits
// 0 and 4) and four branches (bits 0, 2, 4, 6): after each clock edge the
// operand registers must hold the inputs and each lane the product
// b_idx * A * x^idx modulo x^7 + 1 from the reference model.
module tb_aop_pe_first;
  import tb_gf_ref_pkg::*;
  localparam int unsigned M = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [M:0] a, b, a2, b2, a4, b4;
  logic [1:0][M:0] p2;
  logic [3:0][M:0] p4;

  always #5 clk = ~clk;

  aop_pe_first #(.M(M), .BR(2), .L(4)) u_dut2 (.clk(clk), .a_i(a), .b_i(b), .a_q(a2), .b_q(b2), .p_q(p2));
  aop_pe_first #(.M(M), .BR(4), .L(2)) u_dut4 (.clk(clk), .a_i(a), .b_i(b), .a_q(a4), .b_q(b4), .p_q(p4));

  function automatic logic [M:0] lane_ref(input logic [M:0] av, input logic [M:0] bv, input int idx);
    vec_t xi;
    xi      = '0;
    xi[idx] = bv[idx];
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
      @(posedge clk); #1;
      checks += 4;
      if (a2 !== a || b2 !== b || a4 !== a || b4 !== b) begin
        failures++;
        $display("FAIL operand registers");
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (p2[k] !== lane_ref(a, b, 4 * k)) begin
          failures++;
          $display("FAIL BR=2 lane %0d a=%b b=%b got %b", k, a, b, p2[k]);
        end
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (p4[k] !== lane_ref(a, b, 2 * k)) begin
          failures++;
          $display("FAIL BR=4 lane %0d a=%b b=%b got %b", k, a, b, p4[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
