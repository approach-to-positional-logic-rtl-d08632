// tb_corr_block: exhaustive check of corr_block for K = 3: the output must be 1
// exactly when every input bit differs from its inverter control bit.
module tb_corr_block;
  localparam int unsigned K = 3;
  logic [K-1:0] x, m;
  logic         y;
  int checks = 0, failures = 0;

  corr_block #(.K(K)) dut (.x(x), .m(m), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mv = 0; mv < 2 ** K; mv++) begin
      for (int xv = 0; xv < 2 ** K; xv++) begin
        logic exp_y;
        x = K'(xv);
        m = K'(mv);
        exp_y = 1'b1;
        for (int b = 0; b < K; b++) if (((xv >> b) & 1) == ((mv >> b) & 1)) exp_y = 1'b0;
        #1;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL x=%b m=%b y=%b expected %b", x, m, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
