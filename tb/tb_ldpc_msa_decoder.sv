// tb_ldpc_msa_decoder: self-checking testbench of the scaled Min-Sum decoder.
//
// Valid code-words come from the reference encoder; channel LLRs are the
// code-word mapped to +-A plus pseudo-Gaussian noise (sum of four uniform
// draws). Every case is compared with the bit-exact reference decoder of
// tb_ldpc_ref_pkg: output code-word, message, success flag, iteration count
// and minimum FCN count. The done latency, counted in rising edges after the edge that accepted
// start up to the edge that samples done high, is checked against 2*iters + 2.
// Cases span a clean channel (one iteration), moderate noise (several
// iterations, zero syndrome reached) and heavy noise (iteration limit hit,
// output taken from the FCN memory).
module tb_ldpc_msa_decoder;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;

  localparam int Z     = 27;
  localparam int LLR_W = 8;
  localparam int IMAX  = 20;
  localparam int N     = NB * Z;
  localparam int K     = KB * Z;
  localparam int M     = MB * Z;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    start;
  logic                    ready;
  logic signed [LLR_W-1:0] llr_in [N];
  logic [3:0]              alpha_in;
  logic                    done;
  logic [N-1:0]            cw_out;
  logic [K-1:0]            msg_out;
  logic                    success;
  logic [$clog2(IMAX+1)-1:0] iters;
  logic [$clog2(M+1)-1:0]  fcn_min;

  ldpc_msa_decoder #(.Z(Z), .LLR_W(LLR_W), .IMAX(IMAX)) dut (.*);

  int checks = 0, failures = 0;
  int n_success = 0, n_limit = 0, n_fcn_pick = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int noise(int amp);
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 2 * amp)) - amp;
    return s / 2;
  endfunction

  task automatic run_case(int alpha, int amp, int namp);
    bit   msg[], cw[], ref_cw[];
    int   llr[];
    int   ref_iters, ref_fcn, lat;
    bit   ref_ok;
    bit   cw_ok;
    msg = new[K];
    foreach (msg[i]) msg[i] = bit'($urandom_range(0, 1));
    encode(Z, msg, cw);
    check(count_fcn(Z, cw) == 0, "reference code-word has a zero syndrome");
    llr = new[N];
    foreach (llr[i]) begin
      llr[i] = sat((cw[i] ? -amp : amp) + noise(namp), LLR_W);
      llr_in[i] = LLR_W'(llr[i]);
    end
    decode(Z, LLR_W, IMAX, alpha, llr, ref_cw, ref_iters, ref_fcn, ref_ok);
    alpha_in = 4'(alpha);
    wait (ready);
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!done);
    #1;
    cw_ok = 1;
    foreach (ref_cw[i]) if (cw_out[i] != ref_cw[i]) cw_ok = 0;
    check(cw_ok, $sformatf("code-word matches reference (alpha=%0d amp=%0d noise=%0d)", alpha, amp, namp));
    check(msg_out == cw_out[K-1:0], "message is the systematic part");
    check(success == ref_ok, $sformatf("success %0d vs %0d", success, ref_ok));
    check(int'(iters) == ref_iters, $sformatf("iterations %0d vs %0d", iters, ref_iters));
    check(int'(fcn_min) == ref_fcn, $sformatf("fcn_min %0d vs %0d", fcn_min, ref_fcn));
    check(lat == 2 * ref_iters + 2, $sformatf("latency %0d vs %0d", lat, 2 * ref_iters + 2));
    if (ref_ok) begin
      cw_ok = 1;
      foreach (cw[i]) if (cw_out[i] != cw[i]) cw_ok = 0;
      check(cw_ok, "successful decode returns the transmitted code-word");
      n_success++;
    end else begin
      n_limit++;
      if (ref_fcn > 0 && ref_iters == IMAX) n_fcn_pick++;
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0;
    alpha_in = '0;
    foreach (llr_in[i]) llr_in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // clean channel: one iteration
    run_case(9, 24, 0);
    check(iters == 1, "clean code-word decodes in one iteration");
    // moderate noise, several alphas from the OSF tables
    run_case(9, 16, 14);
    run_case(8, 16, 16);
    run_case(6, 16, 16);
    run_case(3, 12, 14);
    // heavy noise: iteration limit and FCN selection
    run_case(9, 8, 30);
    run_case(5, 8, 40);
    check(n_success >= 3, "some noisy frames converge");
    check(n_limit >= 1, "iteration limit reached at least once");
    $display("decoded=%0d limit=%0d", n_success, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
