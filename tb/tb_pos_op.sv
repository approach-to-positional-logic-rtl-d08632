// tb_pos_op: checks the fixed positional operator against the identities it
// must satisfy: S_{2^K}^K is the AND of all inputs, S_{2^(K+1)-2}^K the OR,
// S_5^2 the XNOR, S_8^4 "exactly three ones", over all inputs.
module tb_pos_op;
  logic [3:0] x4;
  logic [1:0] x2;
  logic       y_and4, y_or4, y_three4, y_xnor2;
  int checks = 0, failures = 0;

  pos_op #(.K(4), .J(5'd16)) u_and4   (.x(x4), .y(y_and4));
  pos_op #(.K(4), .J(5'd30)) u_or4    (.x(x4), .y(y_or4));
  pos_op #(.K(4), .J(5'd8))  u_three4 (.x(x4), .y(y_three4));
  pos_op #(.K(2), .J(3'd5))  u_xnor2  (.x(x2), .y(y_xnor2));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x4=%b x2=%b got %b expected %b", what, x4, x2, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v);
      x2 = 2'(v);
      #1;
      check("and4", y_and4, &x4);
      check("or4", y_or4, |x4);
      check("three4", y_three4, (v == 7) || (v == 11) || (v == 13) || (v == 14));
      check("xnor2", y_xnor2, x2[0] ~^ x2[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
