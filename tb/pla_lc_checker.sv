// pla_lc_checker: testbench helper that instantiates one pla_lc of a given size
// and checks it with random programs. Each trial draws a random program (operator
// vectors, correction vectors with random enables and kinds, conjunction
// inverter controls) and then applies argument vectors x of N variables: x_l of
// every counter takes the low K variables, x_h of every FB the high N-K, and an
// enabled correction block takes x_l (a disabled one is fed zeros with m = 0).
// The expected value is computed from the program as a truth function, vector
// by vector: z = OR over fragments whose conjunction matches the high variables
// of (some CB "1" vector equals the low variables, or j[ones(low)] with no CB "0"
// vector equal to the low variables). All 2^N vectors are applied when N <= 12,
// else VECS random ones, half of them aimed at a correction target
// within its fragment. Counts how often a CB "1" set and a CB "0" cleared the
// output, and how often an inverted conjunction variable was selected. L0, L1
// may be 0 and N may equal K.
module pla_lc_checker #(
  parameter int unsigned N      = 5,
  parameter int unsigned K      = 3,
  parameter int unsigned L0     = 1,
  parameter int unsigned L1     = 1,
  parameter int unsigned TRIALS = 20,
  parameter int unsigned VECS   = 2000
) (
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_set,
  output int unsigned n_clear,
  output int unsigned n_inv_used,
  output logic        done
);
  localparam int unsigned NFB  = 2 ** (N - K);
  localparam int unsigned NCNT = (NFB > 1) ? NFB / 2 : 1;
  localparam int unsigned H    = N - K;
  localparam int unsigned HP   = (H == 0) ? 1 : H;
  localparam int unsigned L0P  = (L0 == 0) ? 1 : L0;
  localparam int unsigned L1P  = (L1 == 0) ? 1 : L1;

  logic [NCNT-1:0][K-1:0]        x_l;
  logic [NFB-1:0][HP-1:0]        x_h;
  logic [NFB-1:0][K:0]           s;
  logic [NFB-1:0][L0P-1:0][K-1:0] x_cb0, m0;
  logic [NFB-1:0][L1P-1:0][K-1:0] x_cb1, m1;
  logic [NFB-1:0][HP-1:0]        n_inv;
  logic                          z;

  // program: correction target vectors and enables
  // (one spare entry where a kind has no blocks; it stays disabled)
  logic [K-1:0] t0 [NFB][L0P];
  logic [K-1:0] t1 [NFB][L1P];
  bit           e0 [NFB][L0P];
  bit           e1 [NFB][L1P];

  pla_lc #(.N(N), .K(K), .L0(L0), .L1(L1)) dut (
    .x_l(x_l), .x_h(x_h), .s(s), .x_cb0(x_cb0), .m0(m0), .x_cb1(x_cb1), .m1(m1),
    .n_inv(n_inv), .z(z)
  );

  function automatic logic [K-1:0] rand_k();
    logic [K-1:0] r;
    for (int b = 0; b < K; b++) r[b] = 1'($urandom_range(0, 1));
    return r;
  endfunction

  task automatic apply(logic [N-1:0] x);
    logic [K-1:0] lo;
    logic [HP-1:0] hi;
    int           ones;
    logic         exp_z;
    bit           any_set, any_clear, inv_sel;
    lo = x[K-1:0];
    hi = HP'(x >> K);
    for (int c = 0; c < NCNT; c++) x_l[c] = lo;
    for (int i = 0; i < NFB; i++) begin
      x_h[i] = hi;
      for (int j = 0; j < L0P; j++) x_cb0[i][j] = e0[i][j] ? lo : '0;
      for (int j = 0; j < L1P; j++) x_cb1[i][j] = e1[i][j] ? lo : '0;
    end
    ones = 0;
    for (int b = 0; b < K; b++) ones += int'(lo[b]);
    exp_z = 1'b0;
    any_set = 0;
    any_clear = 0;
    inv_sel = 0;
    for (int i = 0; i < NFB; i++) begin
      bit sel, hit0, hit1, val;
      sel = 1;
      for (int b = 0; b < H; b++) if (hi[b] == n_inv[i][b]) sel = 0;
      hit0 = 0;
      hit1 = 0;
      for (int j = 0; j < L0; j++) if (e0[i][j] && t0[i][j] == lo) hit0 = 1;
      for (int j = 0; j < L1; j++) if (e1[i][j] && t1[i][j] == lo) hit1 = 1;
      val = hit1 ? 1'b1 : (hit0 ? 1'b0 : s[i][ones]);
      if (sel) begin
        exp_z |= val;
        if (hit1 && !s[i][ones]) any_set = 1;
        if (hit0 && !hit1 && s[i][ones]) any_clear = 1;
        if (n_inv[i] != '0) inv_sel = 1;
      end
    end
    #1;
    checks++;
    if (any_set) n_set++;
    if (any_clear) n_clear++;
    if (inv_sel) n_inv_used++;
    if (z !== exp_z) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d K=%0d x=%b z=%b expected %b", N, K, x, z, exp_z);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_set = 0; n_clear = 0; n_inv_used = 0; done = 0;
    for (int tr = 0; tr < TRIALS; tr++) begin
      for (int i = 0; i < NFB; i++) begin
        for (int b = 0; b <= K; b++) s[i][b] = 1'($urandom_range(0, 1));
        n_inv[i] = '0;
        for (int b = 0; b < H; b++) n_inv[i][b] = 1'($urandom_range(0, 1));
        for (int j = 0; j < L0P; j++) begin
          e0[i][j] = (j < L0) && ($urandom_range(0, 1) == 1);
          t0[i][j] = rand_k();
          m0[i][j] = e0[i][j] ? ~t0[i][j] : '0;
        end
        for (int j = 0; j < L1P; j++) begin
          e1[i][j] = (j < L1) && ($urandom_range(0, 1) == 1);
          t1[i][j] = rand_k();
          m1[i][j] = e1[i][j] ? ~t1[i][j] : '0;
        end
      end
      if (N <= 12) begin
        for (longint v = 0; v < (longint'(1) << N); v++) apply(N'(v));
      end else begin
        for (int v = 0; v < VECS; v++) begin
          logic [N-1:0] x;
          for (int b = 0; b < N; b++) x[b] = 1'($urandom_range(0, 1));
          // half of the vectors hit a correction target inside its fragment
          if ($urandom_range(0, 1) == 1) begin
            int fb;
            fb = $urandom_range(0, NFB - 1);
            for (int b = 0; b < H; b++) x[K + b] = ~n_inv[fb][b];
            x[K-1:0] = ($urandom_range(0, 1) == 1) ? t1[fb][$urandom_range(0, L1P - 1)]
                                                   : t0[fb][$urandom_range(0, L0P - 1)];
          end
          apply(x);
        end
      end
    end
    done = 1;
  end
endmodule
