// tb_gf_bsc - checks the bit-shift cell for every shift amount of m = 6
// against the operand rotations printed for A = x + x^3 + x^5 in the m = 6
// example, and for random operands against multiplication by x^i modulo
// x^(m+1)+1 from the reference package.
module tb_gf_bsc;
  import tb_gf_ref_pkg::*;
  localparam int unsigned M = 6;

  int checks = 0, failures = 0;
  logic [M:0] a;
  logic [M:0] sh [M+1];

  for (genvar i = 0; i <= M; i++) begin : g_dut
    gf_bsc #(.M(M), .SHIFT(i)) u_dut (.a_i(a), .a_o(sh[i]));
  end

  // Example rotations, written with the x^0 coefficient first (leftmost).
  string ex [1:6] = '{"0010101", "1001010", "0100101", "1010010", "0101001", "1010100"};

  function automatic logic [M:0] from_str(input string s);
    logic [M:0] v;
    for (int k = 0; k <= M; k++) v[k] = (s[k] == "1");
    return v;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = from_str("0101010");
    #1;
    for (int i = 1; i <= 6; i++) begin
      checks++;
      if (sh[i] !== from_str(ex[i])) begin
        failures++;
        $display("FAIL example shift %0d: got %b", i, sh[i]);
      end
    end
    for (int t = 0; t < 50; t++) begin
      a = (M+1)'($urandom());
      #1;
      for (int i = 0; i <= M; i++) begin
        vec_t xi;
        xi    = '0;
        xi[i] = 1'b1;
        checks++;
        if (sh[i] !== (M+1)'(aop_ring_mul(vec_t'(a), xi, M))) begin
          failures++;
          $display("FAIL shift %0d a=%b got %b", i, a, sh[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
