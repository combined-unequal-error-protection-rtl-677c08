// tb_ldpc_encoder: checks the LDPC encoder on random messages.
// Each code-word must satisfy every parity check of H (syndrome computed
// from the edge list), carry the message in its first K bits and equal the
// reference encoder's word. Also checks the one-cycle latency and that the
// output is held while out_ready is low.
module tb_ldpc_encoder;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;

  localparam int Z = 27;
  localparam int N = NB * Z;
  localparam int K = KB * Z;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [K-1:0] in_msg;
  logic [N-1:0] out_cw;

  ldpc_encoder #(.Z(Z)) dut (.*);

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
    bit msg[], cw[], ref_cw[];
    logic [N-1:0] held;
    in_valid = 0; out_ready = 1; in_msg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      msg = new[K];
      foreach (msg[i]) msg[i] = (t == 0) ? 1'b0 : (t == 1) ? 1'b1 : bit'($urandom_range(0, 1));
      foreach (msg[i]) in_msg[i] = msg[i];
      @(negedge clk);
      in_valid = 1;
      @(posedge clk);
      #1 in_valid = 0;
      check(out_valid, "code-word valid one cycle after the message");
      cw = new[N];
      foreach (cw[i]) cw[i] = out_cw[i];
      check(count_fcn(Z, cw) == 0, $sformatf("word %0d satisfies all parity checks", t));
      check(out_cw[K-1:0] == in_msg, "systematic part equals the message");
      encode(Z, msg, ref_cw);
      check(cw == ref_cw, "matches reference encoder");
    end
    // back-pressure: output held while out_ready is low
    @(negedge clk);
    out_ready = 0;
    held = out_cw;
    in_msg = ~in_msg;
    in_valid = 1;
    repeat (3) @(posedge clk);
    #1;
    check(out_cw == held && out_valid && !in_ready, "output held under back-pressure");
    @(negedge clk);
    out_ready = 1;
    @(posedge clk);
    #1 in_valid = 0;
    check(out_cw[K-1:0] == in_msg, "next message accepted after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
