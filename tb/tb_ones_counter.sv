// tb_ones_counter: exhaustive check of ones_counter for K = 5. For every input
// vector the expected one-hot line is found by testing each bit in turn.
module tb_ones_counter;
  localparam int unsigned K = 5;
  logic [K-1:0] x;
  logic [K:0]   count_oh;
  int checks = 0, failures = 0;

  ones_counter #(.K(K)) dut (.x(x), .count_oh(count_oh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** K; v++) begin
      int ones;
      logic [K:0] exp_oh;
      x = K'(v);
      ones = 0;
      for (int b = 0; b < K; b++) if ((v >> b) & 1) ones++;
      exp_oh = '0;
      exp_oh[ones] = 1'b1;
      #1;
      checks++;
      if (count_oh !== exp_oh) begin
        failures++;
        $display("FAIL x=%b count_oh=%b expected %b", x, count_oh, exp_oh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
