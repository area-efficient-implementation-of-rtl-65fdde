// tb_aop_adder_cell - checks the adder cell (m = 20): the sum of its inputs,
// bit by bit, must appear one clock edge later and hold until the next edge.
module tb_aop_adder_cell;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [20:0] x, y, z, exp_z;

  always #5 clk = ~clk;

  aop_adder_cell #(.M(20)) u_dut (.clk(clk), .x_i(x), .y_i(y), .z_q(z));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      x = 21'($urandom()); y = 21'($urandom());
      for (int k = 0; k <= 20; k++) exp_z[k] = x[k] != y[k];
      @(posedge clk); #1;
      checks++;
      if (z !== exp_z) begin failures++; $display("FAIL x=%h y=%h z=%h", x, y, z); end
      @(negedge clk);
      x = ~x;
      #1;
      checks++;
      if (z !== exp_z) begin failures++; $display("FAIL output changed between edges"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
