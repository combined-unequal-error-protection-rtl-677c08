// osf_lut: optimized-scaling-factor lookup table.
//
// The scaling factor alpha of the Min-Sum decoder is found off-line, for each
// Eb/N0, as the value in 0..1 that gives the lowest bit error rate, and stored
// in a table that the receiver reads with the Eb/N0 of the incoming signal.
// This block holds the tables for the combined UEP + OSF + FCN scheme: code
// lengths 648 and 1296, rates 1/2, 2/3 and 3/4, 16-QAM and 64-QAM.
//
// Eb/N0 is given in half-dB steps (ebn0_hdb = 2 * Eb/N0 in dB, unsigned). The
// table columns are breakpoints; the entry used is that of the largest
// breakpoint not above ebn0_hdb. Inputs below the first column use the first
// column; entries that were not measured (above the highest Eb/N0 tested for
// that rate) keep the last measured value - both are this design's choice.
// Breakpoints: 16-QAM 0,1,2,3,3.5,4,...,7 dB; 64-QAM 0,2,4,6,8,10,11,...,14 dB.
//
// alpha is returned in tenths (1..10). Purely combinational.
module osf_lut
  import ldpc_pkg::*;
(
  input  logic      len_sel,    // 0: 648-bit code, 1: 1296-bit code
  input  logic [1:0] rate_sel,  // 0: 1/2, 1: 2/3, 2: 3/4 (3 is treated as 3/4)
  input  qam_mode_e mode,
  input  logic [5:0] ebn0_hdb,
  output logic [3:0] alpha
);

  localparam int NCOL = 13;
  typedef int row_t [NCOL];
  typedef row_t tab_t [3];

  // breakpoints in half-dB
  localparam row_t BP_16 = '{0, 2, 4, 6, 7, 8, 9, 10, 11, 12, 13, 14, 99};
  localparam row_t BP_64 = '{0, 4, 8, 12, 16, 20, 22, 23, 24, 25, 26, 27, 28};

  // alpha in tenths; 0 marks an Eb/N0 that was not measured
  localparam tab_t T_648_16 = '{
    '{3, 3, 5, 8, 9, 9, 9, 9, 9, 0, 0, 0, 0},
    '{1, 2, 3, 3, 3, 6, 9, 8, 9, 9, 9, 0, 0},
    '{1, 2, 2, 2, 2, 4, 4, 6, 9, 9, 9, 9, 0}};
  localparam tab_t T_1296_16 = '{
    '{2, 3, 4, 9, 9, 9, 9, 9, 0, 0, 0, 0, 0},
    '{1, 2, 2, 3, 4, 8, 9, 8, 9, 9, 0, 0, 0},
    '{1, 1, 2, 3, 3, 3, 3, 8, 9, 9, 9, 0, 0}};
  localparam tab_t T_648_64 = '{
    '{1, 1, 2, 4, 8, 9, 8, 9, 9, 9, 0, 0, 0},
    '{1, 1, 2, 2, 3, 3, 8, 7, 8, 8, 9, 9, 9},
    '{1, 2, 2, 2, 3, 3, 3, 3, 8, 8, 9, 9, 9}};
  localparam tab_t T_1296_64 = '{
    '{1, 1, 3, 4, 7, 9, 9, 9, 9, 9, 0, 0, 0},
    '{1, 1, 1, 2, 3, 7, 8, 8, 9, 9, 0, 0, 0},
    '{1, 1, 1, 2, 3, 3, 3, 8, 9, 8, 8, 9, 9}};

  always_comb begin
    int   ri;
    row_t bp;
    row_t vals;
    ri = (rate_sel == 2'd0) ? 0 : (rate_sel == 2'd1) ? 1 : 2;
    bp = (mode == MOD_64QAM) ? BP_64 : BP_16;
    case ({len_sel, mode == MOD_64QAM})
      2'b00:   vals = T_648_16[ri];
      2'b10:   vals = T_1296_16[ri];
      2'b01:   vals = T_648_64[ri];
      default: vals = T_1296_64[ri];
    endcase
    alpha = 4'(vals[0]);
    for (int c = 1; c < NCOL; c++)
      if (int'(ebn0_hdb) >= bp[c] && vals[c] != 0) alpha = 4'(vals[c]);
  end

endmodule
