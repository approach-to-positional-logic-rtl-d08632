// pla_fb: functional block (FB) of the positional logic circuit. It computes
// one fragment term
//   f_i = (AND of the n-k conjunction variables, each optionally inverted)
//         & (f_cor1 | (S_j^k[X_k] & f_cor0))
// from the one-hot ones count of a shared ones_counter. Inside are logic group 1
// (pos_select, the positional operator), L0 CB "0" and L1 CB "1" correction
// blocks (corr_block), logic group 2 (corr_merge) and block 3 (frag_and), as in
// the circuit structure. Separate counts for the two correction-block kinds are
// this design's choice. L0 or L1 may be 0 (no blocks of that kind), and N may
// equal K (no conjunction, block 3 is then left out); an empty port keeps one
// bit that is ignored. Combinational.
module pla_fb #(
  parameter int unsigned N  = 5,  // number of Boolean variables n
  parameter int unsigned K  = 3,  // operator order k
  parameter int unsigned L0 = 1,
  parameter int unsigned L1 = 1,
  localparam int unsigned L0P = (L0 == 0) ? 1 : L0,
  localparam int unsigned L1P = (L1 == 0) ? 1 : L1,
  localparam int unsigned HP  = (N == K) ? 1 : N - K
) (
  input  logic [K:0]             count_oh,
  input  logic [K:0]             s,
  input  logic [L0P-1:0][K-1:0]  x_cb0,
  input  logic [L0P-1:0][K-1:0]  m0,
  input  logic [L1P-1:0][K-1:0]  x_cb1,
  input  logic [L1P-1:0][K-1:0]  m1,
  input  logic [HP-1:0]          x_h,
  input  logic [HP-1:0]          n_inv,
  output logic                   y
);
  logic           proto, f;
  logic [L0P-1:0] cb0;
  logic [L1P-1:0] cb1;

  pos_select #(.K(K)) u_group1 (.s(s), .count_oh(count_oh), .y(proto));

  if (L0 == 0) begin : g_no_cb0
    assign cb0 = '0;
  end else begin : g_cb0
    for (genvar i = 0; i < L0; i++) begin : g_blk
      corr_block #(.K(K)) u_cb (.x(x_cb0[i]), .m(m0[i]), .y(cb0[i]));
    end
  end
  if (L1 == 0) begin : g_no_cb1
    assign cb1 = '0;
  end else begin : g_cb1
    for (genvar i = 0; i < L1; i++) begin : g_blk
      corr_block #(.K(K)) u_cb (.x(x_cb1[i]), .m(m1[i]), .y(cb1[i]));
    end
  end

  corr_merge #(.L0(L0), .L1(L1)) u_group2 (.proto(proto), .cb0(cb0), .cb1(cb1), .f(f));

  if (N == K) begin : g_no_block3
    assign y = f;
  end else begin : g_block3
    frag_and #(.H(N-K)) u_block3 (.f(f), .xh(x_h), .ninv(n_inv), .y(y));
  end
endmodule
