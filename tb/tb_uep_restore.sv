// tb_uep_restore: feeds soft bits in transmission order, built from a random
// code-word of LLRs with the UEP rules written out per position, and checks
// that the frame handed to the decoder has every LLR back at its code-word
// position. Rate 1/2 and rate 3/4 instances, both modulations; the frame is
// held, and symbols refused, until frame_ready.
module tb_uep_restore;
  import ldpc_pkg::*;

  localparam int N = 648;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qam_mode_e mode;
  logic sym_valid [2], sym_ready [2], frame_valid [2], frame_ready [2];
  logic signed [W-1:0] sym_llr [6];
  logic signed [W-1:0] frame_llr [2][N];

  uep_restore #(.N(N), .K(324), .LLR_W(W)) dut_r12 (.clk, .rst_n, .mode, .sym_valid(sym_valid[0]),
    .sym_ready(sym_ready[0]), .sym_llr, .frame_valid(frame_valid[0]), .frame_ready(frame_ready[0]),
    .frame_llr(frame_llr[0]));
  uep_restore #(.N(N), .K(486), .LLR_W(W)) dut_r34 (.clk, .rst_n, .mode, .sym_valid(sym_valid[1]),
    .sym_ready(sym_ready[1]), .sym_llr, .frame_valid(frame_valid[1]), .frame_ready(frame_ready[1]),
    .frame_llr(frame_llr[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int inst, bit m64);
    int k, np, u, bps, nsym, t, errs;
    int llr[N];
    int idx[6];
    k = (inst == 0) ? 324 : 486;
    np = N - k; u = k - np; bps = m64 ? 6 : 4;
    nsym = N / bps;
    foreach (llr[i]) llr[i] = int'($urandom_range(0, 254)) - 127;
    mode = m64 ? MOD_64QAM : MOD_16QAM;
    for (int s = 0; s < nsym; s++) begin
      if (s * bps < u) begin
        for (int p = 0; p < bps; p++) idx[p] = s * bps + p;
      end else begin
        t = s - u / bps;
        if (!m64) begin
          idx[0] = u + 2*t; idx[1] = k + 2*t; idx[2] = u + 2*t + 1; idx[3] = k + 2*t + 1;
        end else begin
          idx[0] = u + 3*t; idx[1] = u + 3*t + 1; idx[2] = k + 3*t;
          idx[3] = u + 3*t + 2; idx[4] = k + 3*t + 1; idx[5] = k + 3*t + 2;
        end
      end
      @(negedge clk);
      for (int p = 0; p < 6; p++) sym_llr[p] = (p < bps) ? W'(llr[idx[p]]) : W'(0);
      sym_valid[inst] = 1;
      check(sym_ready[inst], "symbol accepted while collecting");
      @(posedge clk);
      #1 sym_valid[inst] = 0;
      if (s < nsym - 1) check(!frame_valid[inst], "no frame before the last symbol");
    end
    check(frame_valid[inst], "frame valid after the last symbol");
    repeat (3) @(posedge clk);
    #1 check(frame_valid[inst] && !sym_ready[inst], "frame held until frame_ready");
    errs = 0;
    for (int i = 0; i < N; i++) if (int'(frame_llr[inst][i]) != llr[i]) errs++;
    check(errs == 0, $sformatf("K=%0d 64qam=%0d: %0d LLRs misplaced", k, m64, errs));
    @(negedge clk);
    frame_ready[inst] = 1;
    @(posedge clk);
    #1 frame_ready[inst] = 0;
    check(!frame_valid[inst] && sym_ready[inst], "frame released");
  endtask

  initial begin
    mode = MOD_16QAM;
    for (int i = 0; i < 2; i++) begin sym_valid[i] = 0; frame_ready[i] = 0; end
    for (int p = 0; p < 6; p++) sym_llr[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      run(0, 0); run(0, 1); run(1, 0); run(1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
