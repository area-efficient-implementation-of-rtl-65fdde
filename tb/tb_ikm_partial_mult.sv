// tb_ikm_partial_mult - checks the W x W carry-less partial multiplier for
// W = 8 (a sweep of operand pairs, schoolbook array only), W = 64 (two
// Karatsuba levels) and W = 81 (odd widths at every level, Karatsuba down to
// 6 bits) against the bit-serial reference.
module tb_ikm_partial_mult;
  import tb_gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]   x8, y8;
  logic [14:0]  p8;
  logic [63:0]  x64, y64;
  logic [126:0] p64;
  logic [80:0]  x81, y81;
  logic [160:0] p81;

  ikm_partial_mult #(.W(8))  u_dut8  (.x_i(x8),  .y_i(y8),  .p_o(p8));
  ikm_partial_mult #(.W(64)) u_dut64 (.x_i(x64), .y_i(y64), .p_o(p64));
  ikm_partial_mult #(.W(81), .THRESH(6)) u_dut81 (.x_i(x81), .y_i(y81), .p_o(p81));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i += 17) begin
      for (int j = 0; j < 256; j += 3) begin
        x8 = 8'(i); y8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 15'(clmul(vec_t'(x8), vec_t'(y8), 8))) begin
          failures++; $display("FAIL W=8 %h*%h got %h", x8, y8, p8);
        end
      end
    end
    x8 = 8'hff; y8 = 8'hff; #1;
    checks++;
    if (p8 !== 15'b101010101010101) begin failures++; $display("FAIL ff*ff"); end
    for (int t = 0; t < 200; t++) begin
      x64 = {$urandom(), $urandom()}; y64 = {$urandom(), $urandom()};
      #1;
      checks++;
      if (p64 !== 127'(clmul(vec_t'(x64), vec_t'(y64), 64))) begin
        failures++; $display("FAIL W=64 %h*%h", x64, y64);
      end
      x81 = 81'(rand_vec(81)); y81 = 81'(rand_vec(81));
      if (t == 0) begin x81 = '1; y81 = '1; end
      #1;
      checks++;
      if (p81 !== 161'(clmul(vec_t'(x81), vec_t'(y81), 81))) begin
        failures++; $display("FAIL W=81 %h*%h", x81, y81);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
