// tb_fcn_select: drives the failed-check-node selector with random syndromes
// and code-words and compares the count, the running minimum and the stored
// code-word with a software model. Strictly-smaller rule: an equal count
// must not replace the stored word.
module tb_fcn_select;
  localparam int M = 12;
  localparam int N = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic init, update, improved;
  logic [N-1:0] init_cw, cw_in, x_cw;
  logic [M-1:0] syndrome;
  logic [$clog2(M+1)-1:0] fcn_count, fcn_min;

  fcn_select #(.M(M), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mmin, cnt, n_impr, n_equal;
    logic [N-1:0] mx;
    init = 0; update = 0; init_cw = '0; cw_in = '0; syndrome = '0;
    n_impr = 0; n_equal = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 20; frame++) begin
      @(negedge clk);
      init = 1;
      init_cw = N'($urandom);
      @(posedge clk);
      #1 init = 0;
      mmin = M; mx = init_cw;
      check(fcn_min == M && x_cw == mx, "init loads M and the initial word");
      for (int it = 0; it < 8; it++) begin
        @(negedge clk);
        syndrome = '0;
        // fewer failed checks on average as iterations go on
        for (int j = 0; j < M; j++) syndrome[j] = ($urandom_range(0, 9) < 8 - it);
        if (it == 3) syndrome = '1;
        cw_in = N'($urandom);
        cnt = $countones(syndrome);
        update = 1;
        #1 check(int'(fcn_count) == cnt, "failed check nodes counted");
        @(posedge clk);
        #1 update = 0;
        if (cnt < mmin) begin mmin = cnt; mx = cw_in; n_impr++; end
        else if (cnt == mmin) n_equal++;
        check(int'(fcn_min) == mmin, $sformatf("minimum %0d vs %0d", fcn_min, mmin));
        check(x_cw == mx, "memory X holds the word of the minimum");
      end
    end
    check(n_impr > 0 && n_equal > 0, "both replacing and equal-count cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
