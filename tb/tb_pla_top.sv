// tb_pla_top: end-to-end test of pla_top at its default size. The logic
// circuit is programmed with the worked five-variable example (see tb_pla_lc)
// and the same input vectors are streamed through both the circuit and the
// flow-graph pipeline: every LC output is compared with the truth table at once,
// and every pipeline output four cycles later. Then the LC is given random
// programs and compared with a reference model computed here, while the
// pipeline keeps running with gaps. Counted mechanisms, each of which must
// occur at least once: a CB "1" setting the output, a CB "0" clearing it, an
// inverted conjunction variable selecting a fragment, the pipeline accepting
// inputs on consecutive cycles, a pipeline bubble, and a reset flushing
// results in flight.
module tb_pla_top;
  localparam int unsigned N = 5, K = 3, NFB = 4, NCNT = 2, H = 2;

  logic clk = 0, rst_n;
  logic [NCNT-1:0][K-1:0]     lc_x_l;
  logic [NFB-1:0][H-1:0]      lc_x_h, lc_n_inv;
  logic [NFB-1:0][K:0]        lc_s;
  logic [NFB-1:0][0:0][K-1:0] lc_x_cb0, lc_m0, lc_x_cb1, lc_m1;
  logic lc_z;
  logic fg_valid_in, fg_valid_out, fg_z;
  logic [4:0] fg_x;

  int checks = 0, failures = 0, cycle = 0;
  int n_set = 0, n_clear = 0, n_inv_sel = 0, n_b2b = 0, n_bubble = 0, n_flush = 0;

  localparam logic [31:0] TRUTH = (32'h1 << 1) | (32'h1 << 2) | (32'h1 << 3) |
      (32'h1 << 13) | (32'h1 << 14) | (32'h1 << 15) | (32'h1 << 19) |
      (32'h1 << 21) | (32'h1 << 22) | (32'h1 << 23) | (32'h1 << 25) |
      (32'h1 << 26) | (32'h1 << 27) | (32'h1 << 28);

  pla_top dut (.*);

  always #5 clk = ~clk;

  // ---- flow-graph scoreboard --------------------------------------------
  int   exp_cycle [$];
  logic exp_val   [$];
  logic prev_valid = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      if (exp_cycle.size() > 0) n_flush++;
      exp_cycle.delete();
      exp_val.delete();
    end else begin
      if (fg_valid_in) begin
        exp_cycle.push_back(cycle + 4);
        exp_val.push_back(TRUTH[fg_x]);
        if (prev_valid) n_b2b++;
      end else if (prev_valid) n_bubble++;
    end
    prev_valid <= rst_n && fg_valid_in;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (exp_cycle.size() > 0 && exp_cycle[0] == cycle) begin
        checks++;
        if (!fg_valid_out || fg_z !== exp_val[0]) begin
          failures++;
          $display("FAIL flow graph cycle %0d valid=%b z=%b expected %b", cycle, fg_valid_out, fg_z, exp_val[0]);
        end
        void'(exp_cycle.pop_front());
        void'(exp_val.pop_front());
      end else if (fg_valid_out) begin
        checks++;
        failures++;
        $display("FAIL flow graph cycle %0d: unexpected result", cycle);
      end
    end
  end

  // ---- LC reference model ------------------------------------------------
  logic [K-1:0] t0 [NFB], t1 [NFB];
  bit           e0 [NFB], e1 [NFB];

  task automatic drive_lc(logic [4:0] x, bit example);
    logic [K-1:0] lo;
    logic [H-1:0] hi;
    logic exp_z;
    int ones;
    if (example) begin
      // X^l = x5x4x3, X^h = x1x2
      lo = {x[4], x[3], x[2]};
      hi = {x[0], x[1]};
    end else begin
      lo = x[2:0];
      hi = x[4:3];
    end
    lc_x_l = {NCNT{lo}};
    lc_x_h = {NFB{hi}};
    for (int i = 0; i < NFB; i++) begin
      lc_x_cb0[i][0] = e0[i] ? lo : '0;
      lc_x_cb1[i][0] = e1[i] ? lo : '0;
    end
    ones = int'(lo[0]) + int'(lo[1]) + int'(lo[2]);
    exp_z = 0;
    for (int i = 0; i < NFB; i++) begin
      bit sel, hit0, hit1, val;
      sel  = (hi == ~lc_n_inv[i]);
      hit0 = e0[i] && (lo == t0[i]);
      hit1 = e1[i] && (lo == t1[i]);
      val  = hit1 || (lc_s[i][ones] && !hit0);
      if (sel) begin
        exp_z |= val;
        if (hit1 && !lc_s[i][ones]) n_set++;
        if (hit0 && !hit1 && lc_s[i][ones]) n_clear++;
        if (lc_n_inv[i] != '0) n_inv_sel++;
      end
    end
    if (example) exp_z = TRUTH[x];
    #1;
    checks++;
    if (lc_z !== exp_z) begin
      failures++;
      $display("FAIL LC x=%b z=%b expected %b (example=%0d)", x, lc_z, exp_z, example);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    fg_valid_in = 0;
    fg_x = '0;
    lc_m0 = '0;
    // worked-example program; FB index 0 = FB 1
    lc_s     = {4'b0101, 4'b0101, 4'b1000, 4'b0100};
    lc_n_inv = {2'b00,   2'b01,   2'b11,   2'b10};
    lc_m1    = {3'b011,  3'b000,  3'b000,  3'b111};
    for (int i = 0; i < NFB; i++) begin
      e0[i] = 0;
      t0[i] = '0;
      e1[i] = (i == 0) || (i == 3);
      t1[i] = ~lc_m1[i][0];
    end
    drive_lc(5'd0, 1);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // phase 1: example on both circuits, back to back
    for (int v = 0; v < 32; v++) begin
      fg_valid_in = 1;
      fg_x = 5'(v);
      drive_lc(5'(v), 1);
      @(posedge clk);
      #1;
    end

    // phase 2: random LC programs, pipeline with gaps
    for (int tr = 0; tr < 30; tr++) begin
      for (int i = 0; i < NFB; i++) begin
        lc_s[i]     = (K+1)'($urandom);
        lc_n_inv[i] = H'($urandom);
        e0[i] = ($urandom_range(0, 1) == 1);
        e1[i] = ($urandom_range(0, 1) == 1);
        t0[i] = K'($urandom);
        t1[i] = K'($urandom);
        lc_m0[i][0] = e0[i] ? ~t0[i] : '0;
        lc_m1[i][0] = e1[i] ? ~t1[i] : '0;
      end
      for (int v = 0; v < 32; v++) begin
        fg_valid_in = ($urandom_range(0, 3) != 0);
        fg_x = 5'($urandom);
        drive_lc(5'(v), 0);
        @(posedge clk);
        #1;
      end
    end

    // phase 3: reset with results in flight
    fg_valid_in = 1;
    fg_x = 5'd2;
    repeat (2) @(posedge clk);
    #1 rst_n = 0;
    fg_valid_in = 0;
    @(posedge clk);
    #1 rst_n = 1;
    repeat (6) @(posedge clk);
    #1;

    $display("mechanisms: cb1_set=%0d cb0_clear=%0d inv_conj=%0d back_to_back=%0d bubble=%0d flush=%0d",
             n_set, n_clear, n_inv_sel, n_b2b, n_bubble, n_flush);
    if (n_set == 0)     begin failures++; $display("FAIL no CB \"1\" correction seen"); end
    if (n_clear == 0)   begin failures++; $display("FAIL no CB \"0\" correction seen"); end
    if (n_inv_sel == 0) begin failures++; $display("FAIL no inverted conjunction seen"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back inputs"); end
    if (n_bubble == 0)  begin failures++; $display("FAIL no pipeline bubble"); end
    if (n_flush == 0)   begin failures++; $display("FAIL no reset flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
