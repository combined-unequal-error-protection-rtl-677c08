// qam_mapper: IEEE 802.11n 16-QAM / 64-QAM Gray mapper.
//
// The bits of a symbol, b0 first, are split into an in-phase and a
// quadrature half (16-QAM: b0b1 -> I, b2b3 -> Q; 64-QAM: b0b1b2 -> I,
// b3b4b5 -> Q). Each half is Gray mapped onto the odd amplitude levels:
//   16-QAM: 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3
//   64-QAM: 000 -> -7, 001 -> -5, 011 -> -3, 010 -> -1,
//           110 -> +1, 111 -> +3, 101 -> +5, 100 -> +7
// so that the first bit of each half is the sign (quadrant) and, in 64-QAM,
// the second bit selects the minor quadrant. The points are output as
// integer levels; the normalisation to unit average power (1/sqrt(10),
// 1/sqrt(42)) is left to the analog gain stage (this design's choice).
//
// Timing: one symbol per cycle, registered (one cycle latency), valid/ready.
module qam_mapper
  import ldpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  qam_mode_e         mode,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [5:0]        in_bits,
  output logic              out_valid,
  input  logic              out_ready,
  output logic signed [3:0] out_i,
  output logic signed [3:0] out_q
);

  // Gray level of one axis: s = sign bit, m = magnitude bits
  function automatic logic signed [3:0] level16(logic b0, logic b1);
    logic signed [3:0] mag;
    mag = b1 ? 4'sd1 : 4'sd3;
    return b0 ? mag : -mag;
  endfunction

  function automatic logic signed [3:0] level64(logic b0, logic b1, logic b2);
    logic signed [3:0] mag;
    case ({b1, b2})
      2'b10:   mag = 4'sd1;
      2'b11:   mag = 4'sd3;
      2'b01:   mag = 4'sd5;
      default: mag = 4'sd7;
    endcase
    return b0 ? mag : -mag;
  endfunction

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (mode == MOD_64QAM) begin
          out_i <= level64(in_bits[0], in_bits[1], in_bits[2]);
          out_q <= level64(in_bits[3], in_bits[4], in_bits[5]);
        end else begin
          out_i <= level16(in_bits[0], in_bits[1]);
          out_q <= level16(in_bits[2], in_bits[3]);
        end
      end
    end
  end

endmodule
