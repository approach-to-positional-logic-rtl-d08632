// tb_pla_fb: random test of one functional block with n = 6, k = 3 and two
// correction blocks of each kind. Each iteration draws a one-hot count, an
// operator vector, correction inputs that often match their targets, and
// conjunction inputs; the expected fragment term is worked out from the
// fragment record directly.
module tb_pla_fb;
  localparam int unsigned N = 6, K = 3, L0 = 2, L1 = 2, H = N - K;
  logic [K:0]           count_oh, s;
  logic [L0-1:0][K-1:0] x_cb0, m0;
  logic [L1-1:0][K-1:0] x_cb1, m1;
  logic [H-1:0]         x_h, n_inv;
  logic                 y;
  int checks = 0, failures = 0;

  pla_fb #(.N(N), .K(K), .L0(L0), .L1(L1)) dut (
    .count_oh(count_oh), .s(s), .x_cb0(x_cb0), .m0(m0), .x_cb1(x_cb1), .m1(m1),
    .x_h(x_h), .n_inv(n_inv), .y(y)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int m;
      bit hit0, hit1, sel;
      logic exp_y;
      m = $urandom_range(0, K);
      count_oh = (K+1)'(1) << m;
      s = (K+1)'($urandom);
      m0 = {L0*K{1'b0}} | (L0*K)'($urandom);
      m1 = {L1*K{1'b0}} | (L1*K)'($urandom);
      x_cb0 = (L0*K)'($urandom);
      x_cb1 = (L1*K)'($urandom);
      if ($urandom_range(0, 2) == 0) x_cb0[$urandom_range(0, L0-1)] = ~m0[0];
      if ($urandom_range(0, 2) == 0) x_cb1[$urandom_range(0, L1-1)] = ~m1[1];
      n_inv = H'($urandom);
      x_h = ($urandom_range(0, 1) == 1) ? ~n_inv : H'($urandom);
      hit0 = 0;
      hit1 = 0;
      for (int j = 0; j < L0; j++) if (x_cb0[j] == ~m0[j]) hit0 = 1;
      for (int j = 0; j < L1; j++) if (x_cb1[j] == ~m1[j]) hit1 = 1;
      sel = (x_h == ~n_inv);
      exp_y = sel && (hit1 || (s[m] && !hit0));
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d s=%b hit0=%b hit1=%b sel=%b y=%b", m, s, hit0, hit1, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
