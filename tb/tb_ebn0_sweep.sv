// tb_ebn0_sweep: runs the evaluated workload - the 648-bit rate-1/2 code with
// 20 iterations over 16-QAM and 64-QAM - across a range of Eb/N0 values, as
// far as a short simulation allows (a few frames per point, not a full BER
// curve).
//
// The channel is complex AWGN: Gaussian samples from the Box-Muller method,
// with the per-dimension deviation set from Eb/N0, the code rate and the
// average symbol energy of the constellation (10 for 16-QAM, 42 for 64-QAM in
// level units): sigma^2 = Es / (2 * R * bits_per_symbol * Eb/N0).
// The receiver is given the same Eb/N0 for its OSF lookup.
//
// Checks: at the highest Eb/N0 of each modulation every frame is decoded
// without error; the bit error count after decoding does not grow from the
// lowest to the highest Eb/N0; the lowest point does produce errors. The
// per-point error counts are printed.
module tb_ebn0_sweep;
  import ldpc_pkg::*;

  localparam int K = KB * Z_DEFAULT;
  localparam int N = NB * Z_DEFAULT;
  localparam int FRAMES = 25;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qam_mode_e mode;
  logic [5:0] ebn0_hdb;
  logic msg_valid, msg_ready;
  logic [K-1:0] msg;
  logic tx_valid, tx_ready;
  logic signed [3:0] tx_i, tx_q;
  logic rx_valid, rx_ready;
  logic signed [9:0] rx_i, rx_q;
  logic dec_valid, dec_success;
  logic [K-1:0] dec_msg;
  logic [4:0] dec_iters;
  logic [8:0] dec_fcn_min;
  logic [3:0] dec_alpha;

  ldpc_uep_system dut (.*);

  real sigma = 0.0;
  int  ni = 0, nq = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1 << 30))) / real'(1 << 30);
    u2 = (real'($urandom_range(0, 1 << 30))) / real'(1 << 30);
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic int clip(int v);
    return (v > 511) ? 511 : (v < -511) ? -511 : v;
  endfunction

  assign rx_valid = tx_valid;
  assign tx_ready = rx_ready;
  assign rx_i = 10'(clip(int'(tx_i) * 8 + ni));
  assign rx_q = 10'(clip(int'(tx_q) * 8 + nq));

  always @(posedge clk)
    if (rst_n && tx_valid && rx_ready) begin
      ni <= int'($rtoi(gauss() * sigma * 8.0));
      nq <= int'($rtoi(gauss() * sigma * 8.0));
    end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one Eb/N0 point: returns decoded bit errors over FRAMES frames
  task automatic point(bit m64, int hdb, ref int dec_err, ref int n_ok);
    real ebn0, es;
    int  bps;
    bps  = m64 ? 6 : 4;
    es   = m64 ? 42.0 : 10.0;
    ebn0 = 10.0 ** (hdb / 20.0);
    sigma = $sqrt(es / (2.0 * 0.5 * bps * ebn0));
    dec_err = 0;
    n_ok = 0;
    for (int f = 0; f < FRAMES; f++) begin
      int e;
      @(negedge clk);
      for (int i = 0; i < K; i += 32) msg[i +: 32] = $urandom;
      mode = m64 ? MOD_64QAM : MOD_16QAM;
      ebn0_hdb = 6'(hdb);
      msg_valid = 1;
      do @(posedge clk); while (!msg_ready);
      #1 msg_valid = 0;
      do @(posedge clk); while (!dec_valid);
      #1;
      e = $countones(dec_msg ^ msg);
      dec_err += e;
      if (e == 0) n_ok++;
    end
    $display("%s Eb/N0=%4.1f dB alpha=0.%0d: %0d/%0d frames error-free, %0d bit errors in %0d bits",
             m64 ? "64-QAM" : "16-QAM", hdb / 2.0, dec_alpha, n_ok, FRAMES, dec_err, FRAMES * K);
  endtask

  initial begin
    int lo_err, hi_err, ok;
    mode = MOD_16QAM; ebn0_hdb = '0; msg_valid = 0; msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 16-QAM: 0 .. 7 dB
    point(0, 0, lo_err, ok);
    point(0, 4, hi_err, ok);
    point(0, 6, hi_err, ok);
    point(0, 8, hi_err, ok);
    point(0, 14, hi_err, ok);
    check(ok == FRAMES, "16-QAM at 7 dB decodes every frame");
    check(hi_err <= lo_err, "16-QAM errors do not grow with Eb/N0");
    // 64-QAM: 0 .. 14 dB
    point(1, 0, lo_err, ok);
    point(1, 12, hi_err, ok);
    point(1, 16, hi_err, ok);
    point(1, 20, hi_err, ok);
    point(1, 28, hi_err, ok);
    check(ok == FRAMES, "64-QAM at 14 dB decodes every frame");
    check(hi_err <= lo_err, "64-QAM errors do not grow with Eb/N0");
    check(lo_err > 0, "low Eb/N0 produces errors (channel model active)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
