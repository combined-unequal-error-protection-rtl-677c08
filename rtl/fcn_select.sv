// fcn_select: failed-check-node (FCN) selection of the decoder output.
//
// A check node whose parity equation is not met after an iteration is a
// failed check node; the number of failed check nodes tracks the number of
// wrong bits in the hard decision. This block counts them in each iteration's
// syndrome, keeps the smallest count seen so far (FCN_min) and, whenever a new
// count is strictly smaller, stores that iteration's hard-decision code-word in
// the code-word memory X. The decoder always delivers X, so when the
// iteration limit is reached without a zero syndrome the output is the
// code-word of the iteration with the fewest failed check nodes.
//
// Interface and timing:
//   init    : FCN_min <= M (the number of check nodes), X <= init_cw.
//             Preloading X with the channel hard decision is this design's
//             choice; it only matters if no iteration ever beats M.
//   update  : one iteration's syndrome and hard decision; X and FCN_min are
//             written at the clock edge, fcn_count is combinational.
//   improved: registered, 1 when the last update replaced X.
module fcn_select #(
  parameter int M = 324,    // check nodes (N_p)
  parameter int N = 648,    // code-word length
  localparam int CW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic [N-1:0]  init_cw,
  input  logic          update,
  input  logic [M-1:0]  syndrome,
  input  logic [N-1:0]  cw_in,
  output logic [CW-1:0] fcn_count,
  output logic [CW-1:0] fcn_min,
  output logic [N-1:0]  x_cw,
  output logic          improved
);

  always_comb begin
    fcn_count = '0;
    for (int j = 0; j < M; j++) fcn_count += CW'(syndrome[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcn_min  <= CW'(M);
      x_cw     <= '0;
      improved <= 1'b0;
    end else if (init) begin
      fcn_min  <= CW'(M);
      x_cw     <= init_cw;
      improved <= 1'b0;
    end else if (update) begin
      improved <= (fcn_count < fcn_min);
      if (fcn_count < fcn_min) begin
        fcn_min <= fcn_count;
        x_cw    <= cw_in;
      end
    end
  end

endmodule
