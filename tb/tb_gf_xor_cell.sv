// tb_gf_xor_cell - checks the XOR cell (m = 20) bit by bit on random operands.
module tb_gf_xor_cell;
  int checks = 0, failures = 0;
  logic [20:0] x, y, s;

  gf_xor_cell #(.M(20)) u_dut (.x_i(x), .y_i(y), .s_o(s));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      x = 21'($urandom()); y = 21'($urandom());
      #1;
      for (int k = 0; k <= 20; k++) begin
        checks++;
        if (s[k] !== (x[k] != y[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
