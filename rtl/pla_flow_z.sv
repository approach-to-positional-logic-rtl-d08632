// pla_flow_z: evaluates the five-variable example function
//   Z = 1 on input vectors 1-3, 13-15, 19, 21-23, 25-28  (vector = x5..x1, x1 LSB)
// along its positional-logic flow graph
//   Z = S_14^3[ S_4^2 S_8^4 lambda_16[x1x5x4x3x2],
//               S_16^4 S_5^2 lambda_24[x4x3x2x5x1],
//               S_4^2[x1, S_5^3[x5x4x3]] ]
// in four steps, with every transformation and operator of a step working in
// parallel:
//   step 1: lambda_16, lambda_24, t3 = S_5^3[x5x4x3]
//   step 2: t1 = S_8^4[y4..y1], t2 = S_5^2[y'2 y'1], t6 = S_4^2[x1 t3]
//   step 3: t4 = S_4^2[y5 t1], t5 = S_16^4[y'5 y'4 y'3 t2]
//   step 4: Z  = S_14^3[t4 t5 t6]  (OR)
// The graph and its operators follow the published flow graph. Registering
// each step, so that one result leaves per cycle four cycles after its input,
// is this design's choice, as is the valid signal that travels with the data.
// Interface: x is sampled on the rising clk edge when valid_in is 1; z and
// valid_out appear four rising edges later. rst_n is synchronous, active low,
// and clears the valid pipeline only.
module pla_flow_z (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid_in,
  input  logic [4:0] x,          // x[0] = x1 ... x[4] = x5
  output logic       valid_out,
  output logic       z
);
  logic x1, x2, x3, x4, x5;
  assign {x5, x4, x3, x2, x1} = x;

  logic [3:0] vld;

  // step 1 -------------------------------------------------------------------
  logic [4:0] y_d, yp_d;   // y5..y1 and y'5..y'1
  logic       t3_d;
  lambda_xform #(.K(5), .W(5'd16)) u_l16 (.x({x1, x5, x4, x3, x2}), .y(y_d));
  lambda_xform #(.K(5), .W(5'd24)) u_l24 (.x({x4, x3, x2, x5, x1}), .y(yp_d));
  pos_op #(.K(3), .J(4'd5)) u_s5_3 (.x({x5, x4, x3}), .y(t3_d));

  logic [4:0] y_q1, yp_q1;
  logic       t3_q1, x1_q1;
  always_ff @(posedge clk) begin
    if (valid_in) begin
      y_q1  <= y_d;
      yp_q1 <= yp_d;
      t3_q1 <= t3_d;
      x1_q1 <= x1;
    end
  end

  // step 2 -------------------------------------------------------------------
  logic t1_d, t2_d, t6_d;
  pos_op #(.K(4), .J(5'd8)) u_s8_4 (.x(y_q1[3:0]),   .y(t1_d));
  pos_op #(.K(2), .J(3'd5)) u_s5_2 (.x(yp_q1[1:0]),  .y(t2_d));
  pos_op #(.K(2), .J(3'd4)) u_s4_2a (.x({x1_q1, t3_q1}), .y(t6_d));

  logic       t1_q2, t2_q2, t6_q2, y5_q2;
  logic [2:0] yp_hi_q2;    // y'5 y'4 y'3
  always_ff @(posedge clk) begin
    if (vld[0]) begin
      t1_q2    <= t1_d;
      t2_q2    <= t2_d;
      t6_q2    <= t6_d;
      y5_q2    <= y_q1[4];
      yp_hi_q2 <= yp_q1[4:2];
    end
  end

  // step 3 -------------------------------------------------------------------
  logic t4_d, t5_d;
  pos_op #(.K(2), .J(3'd4))  u_s4_2b (.x({y5_q2, t1_q2}),    .y(t4_d));
  pos_op #(.K(4), .J(5'd16)) u_s16_4 (.x({yp_hi_q2, t2_q2}), .y(t5_d));

  logic t4_q3, t5_q3, t6_q3;
  always_ff @(posedge clk) begin
    if (vld[1]) begin
      t4_q3 <= t4_d;
      t5_q3 <= t5_d;
      t6_q3 <= t6_q2;
    end
  end

  // step 4 -------------------------------------------------------------------
  logic z_d;
  pos_op #(.K(3), .J(4'd14)) u_s14_3 (.x({t4_q3, t5_q3, t6_q3}), .y(z_d));

  always_ff @(posedge clk) begin
    if (vld[2]) z <= z_d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], valid_in};
  end

  assign valid_out = vld[3];
endmodule
