// tb_gf_and_cell - checks the AND cell (m = 4 and m = 20) bit by bit on random
// operands for both values of the B bit.
module tb_gf_and_cell;
  int checks = 0, failures = 0;
  logic        b4, b20;
  logic [4:0]  a4, p4;
  logic [20:0] a20, p20;

  gf_and_cell #(.M(4))  u_dut4  (.b_i(b4),  .a_i(a4),  .p_o(p4));
  gf_and_cell #(.M(20)) u_dut20 (.b_i(b20), .a_i(a20), .p_o(p20));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      a4 = 5'($urandom()); a20 = 21'($urandom());
      b4 = 1'(t); b20 = 1'($urandom());
      #1;
      for (int k = 0; k <= 4; k++) begin
        checks++;
        if (p4[k] !== (a4[k] && b4)) failures++;
      end
      for (int k = 0; k <= 20; k++) begin
        checks++;
        if (p20[k] !== (a20[k] && b20)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
