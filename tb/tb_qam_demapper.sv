// tb_qam_demapper: checks the soft demapper. Every noiseless 16-QAM and
// 64-QAM point (levels per the 802.11n Gray tables, written out here) must
// give LLRs whose signs return the transmitted bits (positive = 0) with the
// expected magnitudes, computed from the distance formulas; noisy samples are
// compared with the same formulas, and large samples must saturate.
module tb_qam_demapper;
  import ldpc_pkg::*;

  localparam int RX_W = 10, FRAC = 3, W = 8, ONE = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qam_mode_e mode;
  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [RX_W-1:0] rx_i, rx_q;
  logic signed [W-1:0] out_llr [6];

  qam_demapper #(.RX_W(RX_W), .FRAC(FRAC), .LLR_W(W)) dut (.*);

  localparam int L16 [4] = '{-3, -1, 3, 1};
  localparam int L64 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int clip(int v);
    return (v > 127) ? 127 : (v < -127) ? -127 : v;
  endfunction
  function automatic int a(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic apply(bit m64, int yi, int yq);
    @(negedge clk);
    mode = m64 ? MOD_64QAM : MOD_16QAM;
    rx_i = RX_W'(yi); rx_q = RX_W'(yq);
    in_valid = 1;
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic expect_llr(bit m64, int yi, int yq);
    int e[6];
    e = '{default: 0};
    if (!m64) begin
      e[0] = clip(-yi); e[1] = clip(a(yi) - 2*ONE); e[2] = clip(-yq); e[3] = clip(a(yq) - 2*ONE);
    end else begin
      e[0] = clip(-yi); e[1] = clip(a(yi) - 4*ONE); e[2] = clip(a(a(yi) - 4*ONE) - 2*ONE);
      e[3] = clip(-yq); e[4] = clip(a(yq) - 4*ONE); e[5] = clip(a(a(yq) - 4*ONE) - 2*ONE);
    end
    for (int p = 0; p < 6; p++)
      check(int'(out_llr[p]) == e[p], $sformatf("64qam=%0d y=(%0d,%0d) llr[%0d]=%0d expected %0d",
            m64, yi, yq, p, out_llr[p], e[p]));
  endtask

  initial begin
    #500_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 1; rx_i = '0; rx_q = '0; mode = MOD_16QAM;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // noiseless points: hard decisions return the bits
    for (int v = 0; v < 16; v++) begin
      logic [5:0] b;
      b = 6'(v);
      apply(0, ONE * L16[{b[0], b[1]}], ONE * L16[{b[2], b[3]}]);
      check(out_valid, "output valid one cycle later");
      for (int p = 0; p < 4; p++) check((out_llr[p] < 0) == b[p], $sformatf("16-QAM bit %0d of %b", p, b));
      expect_llr(0, ONE * L16[{b[0], b[1]}], ONE * L16[{b[2], b[3]}]);
    end
    for (int v = 0; v < 64; v++) begin
      logic [5:0] b;
      b = 6'(v);
      apply(1, ONE * L64[{b[0], b[1], b[2]}], ONE * L64[{b[3], b[4], b[5]}]);
      for (int p = 0; p < 6; p++) check((out_llr[p] < 0) == b[p], $sformatf("64-QAM bit %0d of %b", p, b));
      expect_llr(1, ONE * L64[{b[0], b[1], b[2]}], ONE * L64[{b[3], b[4], b[5]}]);
    end
    // noisy and saturating samples
    for (int r = 0; r < 100; r++) begin
      int yi, yq;
      bit m;
      m = bit'(r & 1);
      yi = int'($urandom_range(0, 2 * 511)) - 511;
      yq = int'($urandom_range(0, 2 * 80)) - 80;
      apply(m, yi, yq);
      expect_llr(m, yi, yq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
