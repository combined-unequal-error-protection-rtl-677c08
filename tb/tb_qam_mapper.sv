// tb_qam_mapper: exhaustive check of the 16-QAM and 64-QAM Gray mapping
// against the 802.11n per-axis tables, written out as lists of levels in bit
// order, plus the quadrant properties used for UEP (16-QAM b0,b2 and 64-QAM
// b0,b3 fix the quadrant; 64-QAM b1,b4 fix the minor quadrant). Checks the
// one-cycle latency and back-pressure.
module tb_qam_mapper;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qam_mode_e mode;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [5:0] in_bits;
  logic signed [3:0] out_i, out_q;

  qam_mapper dut (.*);

  // level of an axis indexed by its bits read as {first, second(, third)}
  localparam int L16 [4] = '{-3, -1, 3, 1};                   // 00 01 10 11
  localparam int L64 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};     // 000 .. 111

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq;
    in_valid = 0; out_ready = 1; in_bits = '0; mode = MOD_16QAM;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < ((m == 1) ? 64 : 16); v++) begin
        @(negedge clk);
        mode = (m == 1) ? MOD_64QAM : MOD_16QAM;
        in_bits = 6'(v);
        in_valid = 1;
        @(posedge clk);
        #1 in_valid = 0;
        if (m == 0) begin
          ei = L16[{in_bits[0], in_bits[1]}];
          eq = L16[{in_bits[2], in_bits[3]}];
          check((out_i > 0) == in_bits[0] && (out_q > 0) == in_bits[2], "16-QAM quadrant from b0,b2");
        end else begin
          ei = L64[{in_bits[0], in_bits[1], in_bits[2]}];
          eq = L64[{in_bits[3], in_bits[4], in_bits[5]}];
          check((out_i > 0) == in_bits[0] && (out_q > 0) == in_bits[3], "64-QAM quadrant from b0,b3");
          check((out_i > -4 && out_i < 4) == in_bits[1] && (out_q > -4 && out_q < 4) == in_bits[4],
                "64-QAM minor quadrant from b1,b4");
        end
        check(out_valid && int'(out_i) == ei && int'(out_q) == eq,
              $sformatf("mode %0d bits %b: (%0d,%0d) expected (%0d,%0d)", m, in_bits, out_i, out_q, ei, eq));
      end
    end
    // back-pressure
    @(negedge clk);
    out_ready = 0;
    in_bits = 6'h3f; in_valid = 1;
    repeat (2) @(posedge clk);
    #1 check(!in_ready && out_valid, "stalls while out_ready is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
