// tb_uep_reorder: checks the UEP bit order on random code-words for both
// modulations, with a rate-1/2 (648, 324) instance, where every bit takes
// part in the reordering, and a rate-3/4 (648, 486) instance, where the first
// Ns-Np systematic bits pass unchanged. The expected symbols are written out
// position by position from the constellation rules: 16-QAM b0,b2 systematic,
// b1,b3 parity; 64-QAM b0,b1,b3 systematic, b2,b4,b5 parity. Random
// back-pressure on sym_ready is applied; the symbol count and sym_last are
// checked.
module tb_uep_reorder;
  import ldpc_pkg::*;

  localparam int N = 648;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qam_mode_e mode;
  logic [N-1:0] cw;
  logic cw_valid [2], cw_ready [2], sym_valid [2], sym_ready [2], sym_last [2];
  logic [5:0] sym_bits [2];

  uep_reorder #(.N(N), .K(324)) dut_r12 (.clk, .rst_n, .mode, .cw_valid(cw_valid[0]), .cw_ready(cw_ready[0]), .cw,
    .sym_valid(sym_valid[0]), .sym_ready(sym_ready[0]), .sym_bits(sym_bits[0]), .sym_last(sym_last[0]));
  uep_reorder #(.N(N), .K(486)) dut_r34 (.clk, .rst_n, .mode, .cw_valid(cw_valid[1]), .cw_ready(cw_ready[1]), .cw,
    .sym_valid(sym_valid[1]), .sym_ready(sym_ready[1]), .sym_bits(sym_bits[1]), .sym_last(sym_last[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [5:0] expected(int k, bit m64, int s);
    int np, u, t, bps;
    logic [5:0] b;
    np = N - k; u = k - np; bps = m64 ? 6 : 4;
    b = '0;
    if (s * bps < u) begin
      for (int p = 0; p < bps; p++) b[p] = cw[s * bps + p];
    end else begin
      t = s - u / bps;
      if (!m64) begin
        b[0] = cw[u + 2*t];     b[1] = cw[k + 2*t];
        b[2] = cw[u + 2*t + 1]; b[3] = cw[k + 2*t + 1];
      end else begin
        b[0] = cw[u + 3*t];     b[1] = cw[u + 3*t + 1]; b[2] = cw[k + 3*t];
        b[3] = cw[u + 3*t + 2]; b[4] = cw[k + 3*t + 1]; b[5] = cw[k + 3*t + 2];
      end
    end
    return b;
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int inst, bit m64);
    int k, s, nsym, errs, lasts;
    k = (inst == 0) ? 324 : 486;
    nsym = N / (m64 ? 6 : 4);
    for (int i = 0; i < N; i += 32) cw[i +: 32] = $urandom;
    mode = m64 ? MOD_64QAM : MOD_16QAM;
    @(negedge clk);
    cw_valid[inst] = 1;
    @(posedge clk);
    #1 cw_valid[inst] = 0;
    mode = m64 ? MOD_16QAM : MOD_64QAM;   // latched at acceptance
    s = 0; errs = 0; lasts = 0;
    while (s < nsym + 4) begin
      @(negedge clk);
      sym_ready[inst] = ($urandom_range(0, 3) != 0);
      if (!sym_valid[inst]) break;
      if (sym_ready[inst]) begin
        if (sym_bits[inst] != expected(k, m64, s)) errs++;
        if (sym_last[inst]) begin
          lasts++;
          check(s == nsym - 1, $sformatf("last flagged at symbol %0d of %0d", s, nsym));
        end
        s++;
      end
    end
    check(errs == 0, $sformatf("K=%0d 64qam=%0d: %0d symbols wrong", k, m64, errs));
    check(s == nsym, $sformatf("K=%0d 64qam=%0d: %0d symbols sent, %0d expected", k, m64, s, nsym));
    check(lasts == 1, "exactly one last symbol");
    check(cw_ready[inst], "ready for the next code-word");
  endtask

  initial begin
    cw_valid[0] = 0; cw_valid[1] = 0; cw = '0; mode = MOD_16QAM;
    sym_ready[0] = 0; sym_ready[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      run(0, 0); run(0, 1); run(1, 0); run(1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
