// tb_ldpc_uep_system: end-to-end loop-back test of the transceiver at its
// default size (648-bit code, rate 1/2, 20 iterations).
//
// The transmitter output is looped to the receiver through an AWGN-like
// channel model: each symbol's levels are scaled to the receiver's fixed
// point and a pseudo-Gaussian noise sample (sum of four uniform draws) is
// added. For every code-word the testbench independently
//   * encodes the message with the reference encoder, applies the UEP order
//     and the 802.11n Gray tables, and compares every transmitted symbol;
//   * demaps the received samples with the max-log formulas, puts the LLRs
//     back in code-word order, looks alpha up in the published table and
//     runs the bit-exact reference decoder;
//   * compares message, success flag, iteration count, FCN minimum and alpha.
// It counts how often each mechanism occurred - 16-QAM and 64-QAM UEP
// frames, early stop on a zero syndrome, the iteration limit with output from
// the FCN memory, and distinct alpha values - and fails if any never did.
module tb_ldpc_uep_system;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;

  localparam int Z = Z_DEFAULT;
  localparam int N = NB * Z;
  localparam int K = KB * Z;
  localparam int M = MB * Z;
  localparam int IMAX = 20;
  localparam int RX_W = 10;
  localparam int ONE = 8;      // receiver fixed point: 3 fractional bits
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qam_mode_e mode;
  logic [5:0] ebn0_hdb;
  logic msg_valid, msg_ready;
  logic [K-1:0] msg;
  logic tx_valid, tx_ready;
  logic signed [3:0] tx_i, tx_q;
  logic rx_valid, rx_ready;
  logic signed [RX_W-1:0] rx_i, rx_q;
  logic dec_valid, dec_success;
  logic [K-1:0] dec_msg;
  logic [$clog2(IMAX+1)-1:0] dec_iters;
  logic [$clog2(M+1)-1:0] dec_fcn_min;
  logic [3:0] dec_alpha;

  ldpc_uep_system dut (.*);

  // ---------------- channel model ----------------
  int noise_amp = 0;
  int ni = 0, nq = 0;

  function automatic int gnoise(int amp);
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 2 * amp)) - amp;
    return s / 2;
  endfunction

  function automatic int clip_rx(int v);
    int lim;
    lim = (1 << (RX_W - 1)) - 1;
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  assign rx_valid = tx_valid;
  assign tx_ready = rx_ready;
  assign rx_i = RX_W'(clip_rx(int'(tx_i) * ONE + ni));
  assign rx_q = RX_W'(clip_rx(int'(tx_q) * ONE + nq));

  int sent_i[$], sent_q[$], recv_i[$], recv_q[$];

  always @(posedge clk) begin
    if (rst_n && tx_valid && rx_ready) begin
      sent_i.push_back(int'(tx_i));
      sent_q.push_back(int'(tx_q));
      recv_i.push_back(int'(rx_i));
      recv_q.push_back(int'(rx_q));
      ni <= gnoise(noise_amp);
      nq <= gnoise(noise_amp);
    end
  end

  // ---------------- reference pieces ----------------
  localparam int L16 [4] = '{-3, -1, 3, 1};                // axis bits {first, second}
  localparam int L64 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};  // axis bits {first, second, third}

  // code-word index of bit p of symbol s (rate 1/2: every bit is reordered)
  function automatic int src_index(bit m64, int s, int p);
    int u, t;
    u = K - (N - K);
    if (!m64) begin
      if (s * 4 < u) return s * 4 + p;
      t = s - u / 4;
      case (p)
        0: return u + 2*t;
        1: return K + 2*t;
        2: return u + 2*t + 1;
        default: return K + 2*t + 1;
      endcase
    end else begin
      if (s * 6 < u) return s * 6 + p;
      t = s - u / 6;
      case (p)
        0: return u + 3*t;
        1: return u + 3*t + 1;
        2: return K + 3*t;
        3: return u + 3*t + 2;
        4: return K + 3*t + 1;
        default: return K + 3*t + 2;
      endcase
    end
  endfunction

  function automatic int ab(int v);
    return v < 0 ? -v : v;
  endfunction
  function automatic int cl(int v);
    return (v > 127) ? 127 : (v < -127) ? -127 : v;
  endfunction

  // published alpha (tenths), 648-bit rate-1/2 row, 16-QAM and 64-QAM
  function automatic int ref_alpha(bit m64, int hdb);
    int bp16 [9] = '{0, 2, 4, 6, 7, 8, 9, 10, 11};
    int a16  [9] = '{3, 3, 5, 8, 9, 9, 9, 9, 9};
    int bp64 [10] = '{0, 4, 8, 12, 16, 20, 22, 23, 24, 25};
    int a64  [10] = '{1, 1, 2, 4, 8, 9, 8, 9, 9, 9};
    int r;
    r = m64 ? a64[0] : a16[0];
    if (m64) begin for (int c = 0; c < 10; c++) if (hdb >= bp64[c]) r = a64[c]; end
    else     begin for (int c = 0; c < 9; c++)  if (hdb >= bp16[c]) r = a16[c]; end
    return r;
  endfunction

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n16 = 0, n64 = 0, n_early = 0, n_limit = 0, n_fcn_better = 0;
  bit alpha_seen [16];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(bit m64, int namp, int hdb);
    bit   u[], cw[], ref_cw[];
    int   llr[];
    int   bps, nsym, errs, ref_iters, ref_fcn, alpha;
    bit   ref_ok, msg_ok;
    bps  = m64 ? 6 : 4;
    nsym = N / bps;
    u = new[K];
    foreach (u[i]) u[i] = bit'($urandom_range(0, 1));
    foreach (u[i]) msg[i] = u[i];
    sent_i.delete(); sent_q.delete(); recv_i.delete(); recv_q.delete();
    @(negedge clk);
    mode = m64 ? MOD_64QAM : MOD_16QAM;
    ebn0_hdb = 6'(hdb);
    noise_amp = namp;
    ni = gnoise(namp);
    nq = gnoise(namp);
    msg_valid = 1;
    do @(posedge clk); while (!msg_ready);
    #1 msg_valid = 0;
    do @(posedge clk); while (!dec_valid);
    #1;
    // transmitted symbols
    encode(Z, u, cw);
    check(sent_i.size() == nsym, $sformatf("%0d symbols sent, %0d expected", sent_i.size(), nsym));
    errs = 0;
    for (int s = 0; s < nsym && s < sent_i.size(); s++) begin
      int ei, eq;
      if (!m64) begin
        ei = L16[{cw[src_index(0, s, 0)], cw[src_index(0, s, 1)]}];
        eq = L16[{cw[src_index(0, s, 2)], cw[src_index(0, s, 3)]}];
      end else begin
        ei = L64[{cw[src_index(1, s, 0)], cw[src_index(1, s, 1)], cw[src_index(1, s, 2)]}];
        eq = L64[{cw[src_index(1, s, 3)], cw[src_index(1, s, 4)], cw[src_index(1, s, 5)]}];
      end
      if (sent_i[s] != ei || sent_q[s] != eq) errs++;
    end
    check(errs == 0, $sformatf("%0d transmitted symbols differ from the UEP/Gray reference", errs));
    // receiver reference
    llr = new[N];
    for (int s = 0; s < nsym && s < recv_i.size(); s++) begin
      int yi, yq;
      int y [6];
      yi = recv_i[s]; yq = recv_q[s];
      if (!m64) begin
        y[0] = cl(-yi); y[1] = cl(ab(yi) - 2*ONE); y[2] = cl(-yq); y[3] = cl(ab(yq) - 2*ONE);
      end else begin
        y[0] = cl(-yi); y[1] = cl(ab(yi) - 4*ONE); y[2] = cl(ab(ab(yi) - 4*ONE) - 2*ONE);
        y[3] = cl(-yq); y[4] = cl(ab(yq) - 4*ONE); y[5] = cl(ab(ab(yq) - 4*ONE) - 2*ONE);
      end
      for (int p = 0; p < bps; p++) llr[src_index(m64, s, p)] = y[p];
    end
    alpha = ref_alpha(m64, hdb);
    decode(Z, W, IMAX, alpha, llr, ref_cw, ref_iters, ref_fcn, ref_ok);
    check(int'(dec_alpha) == alpha, $sformatf("alpha %0d, table gives %0d", dec_alpha, alpha));
    msg_ok = 1;
    for (int i = 0; i < K; i++) if (dec_msg[i] != ref_cw[i]) msg_ok = 0;
    check(msg_ok, "decoded message matches the reference decoder");
    check(dec_success == ref_ok, "success flag");
    check(int'(dec_iters) == ref_iters, $sformatf("iterations %0d vs %0d", dec_iters, ref_iters));
    check(int'(dec_fcn_min) == ref_fcn, $sformatf("FCN minimum %0d vs %0d", dec_fcn_min, ref_fcn));
    if (dec_success) begin
      msg_ok = 1;
      for (int i = 0; i < K; i++) if (dec_msg[i] != u[i]) msg_ok = 0;
      check(msg_ok, "converged frame returns the sent message");
      if (dec_iters < IMAX) n_early++;
    end else begin
      n_limit++;
      check(int'(dec_iters) == IMAX, "unconverged frame ran all iterations");
      if (dec_fcn_min > 0) n_fcn_better++;
    end
    if (m64) n64++; else n16++;
    alpha_seen[dec_alpha] = 1;
    $display("frame: %s noise=%0d Eb/N0=%0.1f dB alpha=0.%0d -> success=%0d iters=%0d fcn_min=%0d",
             m64 ? "64-QAM" : "16-QAM", namp, hdb / 2.0, dec_alpha, dec_success, dec_iters, dec_fcn_min);
  endtask

  initial begin
    int distinct;
    mode = MOD_16QAM; ebn0_hdb = '0; msg_valid = 0; msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0, 0, 14);    // 16-QAM, clean
    run_frame(1, 0, 40);    // 64-QAM, clean
    run_frame(0, 6, 6);     // 16-QAM, moderate noise
    run_frame(1, 5, 16);    // 64-QAM, moderate noise
    run_frame(0, 14, 0);    // 16-QAM, heavy noise
    run_frame(1, 12, 8);    // 64-QAM, heavy noise
    distinct = 0;
    foreach (alpha_seen[a]) distinct += int'(alpha_seen[a]);
    check(n16 > 0, "16-QAM UEP frames");
    check(n64 > 0, "64-QAM UEP frames");
    check(n_early > 0, "early stop on zero syndrome");
    check(n_limit > 0, "iteration limit with FCN-selected output");
    check(distinct >= 3, "several OSF values used");
    $display("16qam=%0d 64qam=%0d early_stop=%0d limit=%0d distinct_alpha=%0d",
             n16, n64, n_early, n_limit, distinct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
