// tb_lambda_xform: checks lambda_16 and lambda_24 on five-variable vectors:
// lambda_16 must invert only the leftmost digit, lambda_24 the two leftmost.
module tb_lambda_xform;
  logic [4:0] x, y16, y24;
  int checks = 0, failures = 0;

  lambda_xform #(.K(5), .W(5'd16)) u16 (.x(x), .y(y16));
  lambda_xform #(.K(5), .W(5'd24)) u24 (.x(x), .y(y24));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (y16 !== {~x[4], x[3:0]}) begin
        failures++;
        $display("FAIL lambda16 x=%b y=%b", x, y16);
      end
      checks++;
      if (y24 !== {~x[4], ~x[3], x[2:0]}) begin
        failures++;
        $display("FAIL lambda24 x=%b y=%b", x, y24);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
