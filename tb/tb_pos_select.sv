// tb_pos_select: drives every operator vector s with every one-hot count line
// of K = 3 and checks that the output equals bit m of s.
module tb_pos_select;
  localparam int unsigned K = 3;
  logic [K:0] s, count_oh;
  logic       y;
  int checks = 0, failures = 0;

  pos_select #(.K(K)) dut (.s(s), .count_oh(count_oh), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sv = 0; sv < 2 ** (K + 1); sv++) begin
      for (int m = 0; m <= K; m++) begin
        s = (K+1)'(sv);
        count_oh = (K+1)'(1) << m;
        #1;
        checks++;
        if (y !== 1'((sv >> m) & 1)) begin
          failures++;
          $display("FAIL s=%b m=%0d y=%b", s, m, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
