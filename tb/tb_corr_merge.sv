// tb_corr_merge: exhaustive check of corr_merge with two correction blocks of
// each kind. Expected: 1 if any CB "1" fires; otherwise the prototype, unless a
// CB "0" fires.
module tb_corr_merge;
  localparam int unsigned L0 = 2, L1 = 2;
  logic          proto, f;
  logic [L0-1:0] cb0;
  logic [L1-1:0] cb1;
  int checks = 0, failures = 0;

  corr_merge #(.L0(L0), .L1(L1)) dut (.proto(proto), .cb0(cb0), .cb1(cb1), .f(f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** (1 + L0 + L1); v++) begin
      logic exp_f;
      {proto, cb0, cb1} = (1+L0+L1)'(v);
      if (cb1 != 0)      exp_f = 1'b1;
      else if (cb0 != 0) exp_f = 1'b0;
      else               exp_f = proto;
      #1;
      checks++;
      if (f !== exp_f) begin
        failures++;
        $display("FAIL proto=%b cb0=%b cb1=%b f=%b expected %b", proto, cb0, cb1, f, exp_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
