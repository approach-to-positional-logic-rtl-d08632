// tb_frag_and: exhaustive check of block 3 for H = 2: the output is f when the
// conjunction variables equal the complement of their inverter controls, else 0.
module tb_frag_and;
  localparam int unsigned H = 2;
  logic         f, y;
  logic [H-1:0] xh, ninv;
  int checks = 0, failures = 0;

  frag_and #(.H(H)) dut (.f(f), .xh(xh), .ninv(ninv), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** (1 + 2 * H); v++) begin
      logic exp_y;
      {f, xh, ninv} = (1+2*H)'(v);
      exp_y = f && (xh == ~ninv);
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL f=%b xh=%b ninv=%b y=%b", f, xh, ninv, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
