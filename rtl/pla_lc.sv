// pla_lc: programmable logic circuit that evaluates a Boolean function of N
// variables written as a disjunction of fragment records (positional logic
// algebra form). The input space is split by the n-k conjunction variables into
// up to NFB = 2^(n-k) fragments; each fragment is described by a simple
// positional operator of order k (a value per possible number of ones among k
// variables) plus a few correction conjunctions.
//
// Structure: NCNT = 2^(n-k-1) ones_counter blocks (one when n = k); counter c feeds the two
// functional blocks 2c and 2c+1 (pla_fb), and OR element 4 joins all fragment
// terms into z. Everything is configured through inputs: s (operator vectors),
// m0/m1 (correction inverter controls), n_inv (conjunction inverter controls),
// and the routing of variables onto x_l, x_h, x_cb0, x_cb1, which the user wires
// from the function's arguments. Counts of blocks follow the circuit
// description; the pairing of FBs to counters and the per-port routing are this
// design's choices. L0 or L1 may be 0 and N may equal K (one FB, one counter,
// no conjunction); an empty port then keeps one bit that is ignored.
// Combinational: z settles one gate-path delay after the inputs, with no clock.
module pla_lc #(
  parameter int unsigned N  = 5,
  parameter int unsigned K  = 3,
  parameter int unsigned L0 = 1,
  parameter int unsigned L1 = 1,
  localparam int unsigned NFB  = 2 ** (N - K),
  localparam int unsigned NCNT = (NFB > 1) ? NFB / 2 : 1,
  localparam int unsigned HP   = (N == K) ? 1 : N - K,
  localparam int unsigned L0P  = (L0 == 0) ? 1 : L0,
  localparam int unsigned L1P  = (L1 == 0) ? 1 : L1
) (
  input  logic [NCNT-1:0][K-1:0]         x_l,
  input  logic [NFB-1:0][HP-1:0]        x_h,
  input  logic [NFB-1:0][K:0]            s,
  input  logic [NFB-1:0][L0P-1:0][K-1:0]  x_cb0,
  input  logic [NFB-1:0][L0P-1:0][K-1:0]  m0,
  input  logic [NFB-1:0][L1P-1:0][K-1:0]  x_cb1,
  input  logic [NFB-1:0][L1P-1:0][K-1:0]  m1,
  input  logic [NFB-1:0][HP-1:0]        n_inv,
  output logic                           z
);
  logic [NCNT-1:0][K:0] count_oh;
  logic [NFB-1:0]       f;

  for (genvar c = 0; c < NCNT; c++) begin : g_cnt
    ones_counter #(.K(K)) u_cnt (.x(x_l[c]), .count_oh(count_oh[c]));
  end

  for (genvar i = 0; i < NFB; i++) begin : g_fb
    pla_fb #(.N(N), .K(K), .L0(L0), .L1(L1)) u_fb (
      .count_oh(count_oh[i / 2]),
      .s       (s[i]),
      .x_cb0   (x_cb0[i]),
      .m0      (m0[i]),
      .x_cb1   (x_cb1[i]),
      .m1      (m1[i]),
      .x_h     (x_h[i]),
      .n_inv   (n_inv[i]),
      .y       (f[i])
    );
  end

  // OR element 4
  assign z = |f;
endmodule
