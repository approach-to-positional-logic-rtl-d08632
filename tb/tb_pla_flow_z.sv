// tb_pla_flow_z: streams input vectors into the four-step flow-graph pipeline,
// first all 32 back to back, then random vectors with random gaps, and compares
// every result with the truth table of the example function (ones on vectors
// 1-3, 13-15, 19, 21-23, 25-28). Each result must appear exactly four cycles
// after its input was accepted. A reset in the middle of a burst must drop the
// results in flight.
module tb_pla_flow_z;
  logic       clk = 0, rst_n;
  logic       valid_in, valid_out, z;
  logic [4:0] x;
  int checks = 0, failures = 0;
  int cycle = 0;

  localparam logic [31:0] TRUTH = (32'h1 << 1) | (32'h1 << 2) | (32'h1 << 3) |
      (32'h1 << 13) | (32'h1 << 14) | (32'h1 << 15) | (32'h1 << 19) |
      (32'h1 << 21) | (32'h1 << 22) | (32'h1 << 23) | (32'h1 << 25) |
      (32'h1 << 26) | (32'h1 << 27) | (32'h1 << 28);

  pla_flow_z dut (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .x(x),
                  .valid_out(valid_out), .z(z));

  always #5 clk = ~clk;

  // expected results, tagged with the cycle in which they must appear
  int          exp_cycle [$];
  logic        exp_val   [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && valid_in) begin
      exp_cycle.push_back(cycle + 4);
      exp_val.push_back(TRUTH[x]);
    end
    if (!rst_n) begin
      exp_cycle.delete();
      exp_val.delete();
    end
  end

  // compare just after each edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (exp_cycle.size() > 0 && exp_cycle[0] == cycle) begin
        checks++;
        if (!valid_out || z !== exp_val[0]) begin
          failures++;
          $display("FAIL cycle %0d valid_out=%b z=%b expected %b", cycle, valid_out, z, exp_val[0]);
        end
        void'(exp_cycle.pop_front());
        void'(exp_val.pop_front());
      end else if (valid_out) begin
        checks++;
        failures++;
        $display("FAIL cycle %0d unexpected valid_out", cycle);
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    valid_in = 0;
    x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int v = 0; v < 32; v++) begin
      valid_in = 1;
      x = 5'(v);
      @(posedge clk);
      #1;
    end
    for (int i = 0; i < 200; i++) begin
      valid_in = ($urandom_range(0, 2) != 0);
      x = 5'($urandom);
      @(posedge clk);
      #1;
    end
    // reset while results are in flight
    valid_in = 1;
    x = 5'd1;
    repeat (2) @(posedge clk);
    #1 rst_n = 0;
    valid_in = 0;
    @(posedge clk);
    #1 rst_n = 1;
    repeat (6) @(posedge clk);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
