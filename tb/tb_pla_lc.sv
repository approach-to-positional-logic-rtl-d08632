// tb_pla_lc: tests the logic circuit at its default size (n = 5, k = 3, four
// functional blocks). Part 1 programs the worked example: the function with
// ones on vectors 1-3, 13-15, 19, 21-23, 25-28 (x1 least significant) split
// into the four fragments
//   x1'x2'  S_8^3[x5x4x3]
//   x1'x2  (S_4^3[x5x4x3] | x5'x4'x3')
//   x1 x2'  S_5^3[x5x4x3]
//   x1 x2  (S_5^3[x5x4x3] | x5 x4'x3')
// with X^l = x5x4x3 on both counters and X^h = x1x2 on every FB, and checks all
// 32 vectors against the listed truth table. Part 2 runs random programs
// through pla_lc_checker at the same size. Part 3 feeds the two counters
// different vectors and checks that each FB pair uses its own counter.
module tb_pla_lc;
  localparam int unsigned N = 5, K = 3, NFB = 4, NCNT = 2;

  logic [NCNT-1:0][K-1:0]  x_l;
  logic [NFB-1:0][N-K-1:0] x_h, n_inv;
  logic [NFB-1:0][K:0]     s;
  logic [NFB-1:0][0:0][K-1:0] x_cb0, m0, x_cb1, m1;
  logic z;
  int checks = 0, failures = 0;

  int unsigned c_checks, c_failures, c_set, c_clear, c_inv;
  logic        c_done;

  pla_lc dut (
    .x_l(x_l), .x_h(x_h), .s(s), .x_cb0(x_cb0), .m0(m0), .x_cb1(x_cb1), .m1(m1),
    .n_inv(n_inv), .z(z)
  );

  pla_lc_checker #(.N(5), .K(3), .L0(1), .L1(1), .TRIALS(40)) u_rand (
    .checks(c_checks), .failures(c_failures), .n_set(c_set), .n_clear(c_clear),
    .n_inv_used(c_inv), .done(c_done)
  );

  localparam logic [31:0] TRUTH = (32'h1 << 1) | (32'h1 << 2) | (32'h1 << 3) |
      (32'h1 << 13) | (32'h1 << 14) | (32'h1 << 15) | (32'h1 << 19) |
      (32'h1 << 21) | (32'h1 << 22) | (32'h1 << 23) | (32'h1 << 25) |
      (32'h1 << 26) | (32'h1 << 27) | (32'h1 << 28);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // program of the worked example (FB index 0 = FB 1)
    s     = {4'b0101, 4'b0101, 4'b1000, 4'b0100};
    n_inv = {2'b00,   2'b01,   2'b11,   2'b10};
    m1    = {3'b011,  3'b000,  3'b000,  3'b111};
    m0    = '0;
    x_cb0 = '0;
    for (int v = 0; v < 32; v++) begin
      logic x1, x2, x3, x4, x5;
      {x5, x4, x3, x2, x1} = 5'(v);
      x_l = {2{x5, x4, x3}};
      x_h = {4{x1, x2}};
      x_cb1 = {{x5, x4, x3}, 3'b000, 3'b000, {x5, x4, x3}};
      #1;
      checks++;
      if (z !== TRUTH[v]) begin
        failures++;
        $display("FAIL example vector %0d: z=%b expected %b", v, z, TRUTH[v]);
      end
    end
    // Part 3: counters fed different vectors. FB i alone is enabled (its
    // conjunction matches), its operator selects only count cnt, and each counter
    // gets a random vector; z must follow the counter of FB i, counter i / 2.
    m1 = '0;
    m0 = '0;
    x_cb0 = '0;
    x_cb1 = '0;
    for (int it = 0; it < 200; it++) begin
      int fbi, cnt, ones;
      fbi = $urandom_range(0, NFB - 1);
      cnt = $urandom_range(0, K);
      for (int i = 0; i < NFB; i++) begin
        x_h[i]   = 2'(i);
        n_inv[i] = ~2'(fbi);
        s[i]     = 4'b0001 << cnt;
      end
      for (int c = 0; c < NCNT; c++) x_l[c] = 3'($urandom);
      ones = 0;
      for (int b = 0; b < K; b++) ones += int'(x_l[fbi / 2][b]);
      #1;
      checks++;
      if (z !== (ones == cnt)) begin
        failures++;
        $display("FAIL counter routing: FB %0d x_l=%h z=%b", fbi, x_l, z);
      end
    end
    wait (c_done);
    checks += c_checks;
    failures += c_failures;
    if (c_set == 0 || c_clear == 0 || c_inv == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: set=%0d clear=%0d inv=%0d", c_set, c_clear, c_inv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
