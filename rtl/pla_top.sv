// pla_top: the two circuits built from the positional logic algebra
// representation of Boolean functions, side by side with their own ports:
//  * pla_lc  - the programmable combinational logic circuit (ports lc_*), which
//              computes any function that fits its fragment structure once its
//              operator, inverter and routing inputs are set;
//  * pla_flow_z - a four-step pipelined evaluation of the five-variable example
//              function along its flow graph (ports fg_*, clk, rst_n).
// With the defaults the circuit has N = 5 variables, operators of order K = 3,
// four functional blocks, two ones counters and one correction block of each
// kind per functional block, the size of the worked example. The two parts do
// not interact; clk and rst_n are used by the flow-graph pipeline only.
module pla_top #(
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
  input  logic                           clk,
  input  logic                           rst_n,
  // programmable logic circuit
  input  logic [NCNT-1:0][K-1:0]         lc_x_l,
  input  logic [NFB-1:0][HP-1:0]        lc_x_h,
  input  logic [NFB-1:0][K:0]            lc_s,
  input  logic [NFB-1:0][L0P-1:0][K-1:0]  lc_x_cb0,
  input  logic [NFB-1:0][L0P-1:0][K-1:0]  lc_m0,
  input  logic [NFB-1:0][L1P-1:0][K-1:0]  lc_x_cb1,
  input  logic [NFB-1:0][L1P-1:0][K-1:0]  lc_m1,
  input  logic [NFB-1:0][HP-1:0]        lc_n_inv,
  output logic                           lc_z,
  // flow-graph evaluator
  input  logic                           fg_valid_in,
  input  logic [4:0]                     fg_x,
  output logic                           fg_valid_out,
  output logic                           fg_z
);
  pla_lc #(.N(N), .K(K), .L0(L0), .L1(L1)) u_lc (
    .x_l  (lc_x_l),
    .x_h  (lc_x_h),
    .s    (lc_s),
    .x_cb0(lc_x_cb0),
    .m0   (lc_m0),
    .x_cb1(lc_x_cb1),
    .m1   (lc_m1),
    .n_inv(lc_n_inv),
    .z    (lc_z)
  );

  pla_flow_z u_fg (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (fg_valid_in),
    .x        (fg_x),
    .valid_out(fg_valid_out),
    .z        (fg_z)
  );
endmodule
