// qam_demapper: soft demapper for the IEEE 802.11n 16-QAM / 64-QAM Gray
// constellations of qam_mapper.
//
// For every bit it forms a soft value y that is positive when the bit is more
// likely 1, using the piecewise-linear (max-log) distances of the Gray axis
// mapping:
//   16-QAM: y(b0) = I,  y(b1) = 2 - |I|            (same for Q with b2, b3)
//   64-QAM: y(b0) = I,  y(b1) = 4 - |I|,  y(b2) = 2 - ||I| - 4|
// and outputs LLR = -y (positive LLR = bit 0), the channel LLR of the
// decoder. No noise-variance scaling is applied: the scaled Min-Sum decoder
// does not need it.
//
// Fixed point: rx_i / rx_q are two's complement with FRAC fractional bits in
// units of the constellation level (points at +-1, +-3, ...). The LLRs keep
// the same units and are saturated to +-(2^(LLR_W-1)-1). Unused LLR slots
// (4, 5 in 16-QAM) are 0. One symbol per cycle, registered, valid/ready.
module qam_demapper
  import ldpc_pkg::*;
#(
  parameter int RX_W  = 10,
  parameter int FRAC  = 3,
  parameter int LLR_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  qam_mode_e               mode,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [RX_W-1:0]  rx_i,
  input  logic signed [RX_W-1:0]  rx_q,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [LLR_W-1:0] out_llr [6]
);

  localparam int ONE = 1 << FRAC;

  function automatic int absv(int v);
    return (v < 0) ? -v : v;
  endfunction

  logic signed [LLR_W-1:0] llr_d [6];

  always_comb begin
    int yi, yq;
    yi = int'(rx_i);
    yq = int'(rx_q);
    for (int p = 0; p < 6; p++) llr_d[p] = '0;
    if (mode == MOD_64QAM) begin
      llr_d[0] = LLR_W'(sat_sym(-yi, LLR_W));
      llr_d[1] = LLR_W'(sat_sym(-(4 * ONE - absv(yi)), LLR_W));
      llr_d[2] = LLR_W'(sat_sym(-(2 * ONE - absv(absv(yi) - 4 * ONE)), LLR_W));
      llr_d[3] = LLR_W'(sat_sym(-yq, LLR_W));
      llr_d[4] = LLR_W'(sat_sym(-(4 * ONE - absv(yq)), LLR_W));
      llr_d[5] = LLR_W'(sat_sym(-(2 * ONE - absv(absv(yq) - 4 * ONE)), LLR_W));
    end else begin
      llr_d[0] = LLR_W'(sat_sym(-yi, LLR_W));
      llr_d[1] = LLR_W'(sat_sym(-(2 * ONE - absv(yi)), LLR_W));
      llr_d[2] = LLR_W'(sat_sym(-yq, LLR_W));
      llr_d[3] = LLR_W'(sat_sym(-(2 * ONE - absv(yq)), LLR_W));
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int p = 0; p < 6; p++) out_llr[p] <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_llr <= llr_d;
    end
  end

endmodule
