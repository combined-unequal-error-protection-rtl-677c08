// ldpc_pkg: constants, types and helper functions shared by the LDPC/UEP
// transceiver.
//
// The code is the IEEE 802.11n quasi-cyclic LDPC code of length 648 and rate
// 1/2 (lifting size Z = 27). Its parity-check matrix H is described by a
// 12 x 24 base matrix: entry -1 is a Z x Z zero block, entry h >= 0 is the Z x Z
// identity cyclically shifted by h, so that row z of the block has its single
// 1 in column (z + h) mod Z. The last 12 base columns form the standard's
// encoding structure: a weight-3 column followed by a dual diagonal. The
// matrix is that of the standard; the transceiver was designed around the
// 802.11n codes. Other rates and lengths of the standard are used by swapping
// H_BASE (and MB/NB/KB) for the corresponding base matrix.
//
// Bit conventions used throughout:
//   * QAM symbol bits are numbered b0..b5 in transmission order and carried in
//     a 6-bit vector with b0 at index 0.
//   * A positive LLR means bit 0, a negative LLR means bit 1.
//   * The scaling factor alpha is carried in tenths (0..10 means 0.0..1.0).
package ldpc_pkg;

  localparam int MB = 12;             // base rows (check-node groups)
  localparam int NB = 24;             // base columns (bit-node groups)
  localparam int KB = NB - MB;        // systematic base columns
  localparam int Z_DEFAULT = 27;      // lifting size for the 648-bit code

  typedef int base_row_t [NB];
  typedef base_row_t base_matrix_t [MB];

  localparam base_matrix_t H_BASE = '{
    '{ 0, -1, -1, -1,  0,  0, -1, -1,  0, -1, -1,  0,  1,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{22,  0, -1, -1, 17, -1,  0,  0, 12, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 6, -1,  0, -1, 10, -1, -1, -1, 24, -1,  0, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 2, -1, -1,  0, 20, -1, -1, -1, 25,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{23, -1, -1, -1,  3, -1, -1, -1,  0, -1,  9, 11, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{24, -1, 23,  1, 17, -1,  3, -1, 10, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{25, -1, -1, -1,  8, -1, -1, -1,  7, 18, -1, -1,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{13, 24, -1, -1,  0, -1,  8, -1,  6, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{ 7, 20, -1, 16, 22, 10, -1, -1, 23, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{11, -1, -1, -1, 19, -1, -1, -1, 13, -1,  3, 17, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{25, -1,  8, -1, 23, 18, -1, 14,  9, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{ 3, -1, -1, -1, 16, -1, -1,  2, 25,  5, -1, -1,  1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };


  typedef enum logic {
    MOD_16QAM = 1'b0,
    MOD_64QAM = 1'b1
  } qam_mode_e;

  function automatic int bits_per_symbol(qam_mode_e mode);
    return (mode == MOD_64QAM) ? 6 : 4;
  endfunction

  // Position p (0..5) of a symbol that carries a prioritized (systematic) bit:
  // 16-QAM b0, b2 (they fix the quadrant); 64-QAM b0, b3 (major quadrant) and
  // b1 (minor quadrant).
  function automatic logic is_priority_pos(qam_mode_e mode, int p);
    if (mode == MOD_64QAM) return (p == 0) || (p == 1) || (p == 3);
    return (p == 0) || (p == 2);
  endfunction

  // Rank of position p among the prioritized (or, for the others, among the
  // non-prioritized) positions of its symbol.
  function automatic int pos_slot(qam_mode_e mode, int p);
    int s;
    s = 0;
    for (int q = 0; q < 6; q++)
      if (q < p && is_priority_pos(mode, q) == is_priority_pos(mode, p)) s++;
    return s;
  endfunction

  // The shift of the first parity base column that is not cancelled by a
  // second entry of the same shift: sum over all rows of that column is the
  // identity shifted by this amount (0 for every 802.11n matrix).
  function automatic int hb_residual_shift(int z);
    int res;
    res = 0;
    for (int a = 0; a < MB; a++) begin
      int cnt;
      cnt = 0;
      if (H_BASE[a][KB] >= 0) begin
        for (int b = 0; b < MB; b++)
          if (H_BASE[b][KB] >= 0 && (H_BASE[b][KB] % z) == (H_BASE[a][KB] % z)) cnt++;
        if (cnt % 2 == 1) res = H_BASE[a][KB] % z;
      end
    end
    return res;
  endfunction

  // Saturate a wide signed value to the symmetric range +-(2^(w-1)-1).
  function automatic int sat_sym(int v, int w);
    int lim;
    lim = (1 << (w - 1)) - 1;
    if (v > lim) return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

endpackage
