// tb_osf_lut: spot checks of the OSF lookup table against the published
// scaling factors (in tenths) of the combined UEP + OSF + FCN scheme, for all
// four code-length / modulation tables, including inputs between
// breakpoints, below the first and above the last measured column.
module tb_osf_lut;
  import ldpc_pkg::*;

  logic len_sel;
  logic [1:0] rate_sel;
  qam_mode_e mode;
  logic [5:0] ebn0_hdb;
  logic [3:0] alpha;

  osf_lut dut (.*);

  int checks = 0, failures = 0;

  // len (0:648 1:1296), rate (0..2), 64-QAM?, Eb/N0 in half dB, expected
  task automatic t(int len, int rate, int m64, int hdb, int exp_a);
    len_sel = 1'(len);
    rate_sel = 2'(rate);
    mode = m64 ? MOD_64QAM : MOD_16QAM;
    ebn0_hdb = 6'(hdb);
    #1;
    checks++;
    if (int'(alpha) != exp_a) begin
      failures++;
      $display("FAIL: len=%0d rate=%0d 64qam=%0d ebn0=%0.1f dB: alpha %0d, expected %0d",
               len, rate, m64, hdb / 2.0, alpha, exp_a);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 648 bits, 16-QAM
    t(0, 0, 0, 0, 3);  t(0, 0, 0, 4, 5);  t(0, 0, 0, 6, 8);  t(0, 0, 0, 7, 9);
    t(0, 0, 0, 20, 9); t(0, 0, 0, 5, 5);
    t(0, 1, 0, 8, 6);  t(0, 1, 0, 9, 9);  t(0, 1, 0, 10, 8); t(0, 1, 0, 13, 9);
    t(0, 2, 0, 2, 2);  t(0, 2, 0, 10, 6); t(0, 2, 0, 14, 9); t(0, 2, 0, 63, 9);
    // 1296 bits, 16-QAM
    t(1, 0, 0, 2, 3);  t(1, 0, 0, 6, 9);  t(1, 0, 0, 30, 9);
    t(1, 1, 0, 8, 8);  t(1, 1, 0, 10, 8); t(1, 1, 0, 9, 9);
    t(1, 2, 0, 9, 3);  t(1, 2, 0, 10, 8); t(1, 2, 0, 13, 9);
    // 648 bits, 64-QAM
    t(0, 0, 1, 8, 2);  t(0, 0, 1, 12, 4); t(0, 0, 1, 16, 8); t(0, 0, 1, 22, 8); t(0, 0, 1, 23, 9);
    t(0, 1, 1, 22, 8); t(0, 1, 1, 23, 7); t(0, 1, 1, 28, 9); t(0, 1, 1, 40, 9);
    t(0, 2, 1, 2, 1);  t(0, 2, 1, 4, 2);  t(0, 2, 1, 23, 3); t(0, 2, 1, 24, 8); t(0, 2, 1, 26, 9);
    // 1296 bits, 64-QAM
    t(1, 0, 1, 8, 3);  t(1, 0, 1, 16, 7); t(1, 0, 1, 25, 9);
    t(1, 1, 1, 20, 7); t(1, 1, 1, 22, 8);
    t(1, 2, 1, 23, 8); t(1, 2, 1, 25, 8); t(1, 2, 1, 26, 8); t(1, 2, 1, 27, 9); t(1, 2, 1, 63, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
