// tb_pla_lc_configs: runs the logic circuit at the sizes its evaluation
// compares, one instance per configuration, each checked with random programs
// by pla_lc_checker: (n-k, l) = (0,0), (1,1), (1,2), (2,0), (2,1), (2,2),
// (3,1), (3,2) at numbers of variables n from 5 to 14. Here l is taken as the
// number of correction blocks of each kind in a functional block. Each
// correction path and the conjunction inverters must be exercised wherever the
// configuration has them.
module tb_pla_lc_configs;
  localparam int NCFG = 11;
  int unsigned c_checks [NCFG], c_fail [NCFG], c_set [NCFG], c_clear [NCFG], c_inv [NCFG];
  logic        c_done [NCFG];
  int checks = 0, failures = 0;

  pla_lc_checker #(.N(5),  .K(4),  .L0(1), .L1(1), .TRIALS(30))            u0 (c_checks[0], c_fail[0], c_set[0], c_clear[0], c_inv[0], c_done[0]);
  pla_lc_checker #(.N(7),  .K(6),  .L0(2), .L1(2), .TRIALS(20))            u1 (c_checks[1], c_fail[1], c_set[1], c_clear[1], c_inv[1], c_done[1]);
  pla_lc_checker #(.N(6),  .K(4),  .L0(1), .L1(1), .TRIALS(20))            u2 (c_checks[2], c_fail[2], c_set[2], c_clear[2], c_inv[2], c_done[2]);
  pla_lc_checker #(.N(9),  .K(7),  .L0(2), .L1(2), .TRIALS(6))             u3 (c_checks[3], c_fail[3], c_set[3], c_clear[3], c_inv[3], c_done[3]);
  pla_lc_checker #(.N(8),  .K(5),  .L0(1), .L1(1), .TRIALS(8))             u4 (c_checks[4], c_fail[4], c_set[4], c_clear[4], c_inv[4], c_done[4]);
  pla_lc_checker #(.N(10), .K(7),  .L0(2), .L1(2), .TRIALS(4))             u5 (c_checks[5], c_fail[5], c_set[5], c_clear[5], c_inv[5], c_done[5]);
  pla_lc_checker #(.N(14), .K(11), .L0(2), .L1(2), .TRIALS(4), .VECS(3000)) u6 (c_checks[6], c_fail[6], c_set[6], c_clear[6], c_inv[6], c_done[6]);
  pla_lc_checker #(.N(14), .K(12), .L0(1), .L1(1), .TRIALS(4), .VECS(3000)) u7 (c_checks[7], c_fail[7], c_set[7], c_clear[7], c_inv[7], c_done[7]);
  pla_lc_checker #(.N(6),  .K(6),  .L0(0), .L1(0), .TRIALS(20))            u8 (c_checks[8], c_fail[8], c_set[8], c_clear[8], c_inv[8], c_done[8]);
  pla_lc_checker #(.N(7),  .K(5),  .L0(0), .L1(0), .TRIALS(10))            u9 (c_checks[9], c_fail[9], c_set[9], c_clear[9], c_inv[9], c_done[9]);
  pla_lc_checker #(.N(12), .K(12), .L0(0), .L1(0), .TRIALS(2))             u10 (c_checks[10], c_fail[10], c_set[10], c_clear[10], c_inv[10], c_done[10]);

  // which mechanisms each configuration has: CBs, conjunction
  localparam bit HAS_CB   [NCFG] = '{1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0};
  localparam bit HAS_CONJ [NCFG] = '{1, 1, 1, 1, 1, 1, 1, 1, 0, 1, 0};

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int c = 0; c < NCFG; c++) wait (c_done[c]);
    for (int c = 0; c < NCFG; c++) begin
      checks += c_checks[c];
      failures += c_fail[c];
      $display("config %0d: checks=%0d failures=%0d cb1_set=%0d cb0_clear=%0d inv_conj=%0d",
               c, c_checks[c], c_fail[c], c_set[c], c_clear[c], c_inv[c]);
      if (c_checks[c] == 0 || (HAS_CB[c] && (c_set[c] == 0 || c_clear[c] == 0)) ||
          (HAS_CONJ[c] && c_inv[c] == 0)) begin
        failures++;
        $display("FAIL config %0d did not exercise every correction path", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
