// uep_reorder: unequal-error-protection bit reordering in front of the QAM
// mapper.
//
// In the 802.11n Gray-mapped constellations some bit positions of a symbol
// are better protected than others: in 16-QAM b0 and b2 only select the
// quadrant, in 64-QAM b0 and b3 select the major quadrant and b1 (with b4)
// the minor quadrant. With Ns systematic and Np parity bits in the code-word
// (Ns >= Np for every rate used), the last Np systematic bits are interleaved
// with the Np parity bits so that the systematic bits land on the prioritized
// positions: 16-QAM b0,b2 systematic and b1,b3 parity; 64-QAM b0,b1,b3
// systematic and b2,b4,b5 parity. The first Ns-Np systematic bits are sent
// first, unchanged, followed by the reordered part. Within each class the
// bits keep their code-word order (the exact interleaving order inside a
// class is this design's choice).
//
// Interface: a code-word (cw[i] is code-word bit i, bits 0..K-1 systematic)
// is accepted with cw_valid & cw_ready together with the modulation; then one
// symbol's bits per cycle leave on sym_bits (b0 at index 0; b4,b5 are 0 in
// 16-QAM) with a valid/ready handshake; sym_last marks the final symbol.
// (K - (N-K)) and 2*(N-K) must be multiples of the bits per symbol.
module uep_reorder
  import ldpc_pkg::*;
#(
  parameter int N = NB * Z_DEFAULT,   // code-word length
  parameter int K = KB * Z_DEFAULT,   // systematic bits (Ns)
  localparam int NP = N - K,          // parity bits (Np)
  localparam int U  = K - NP,         // systematic bits left in place
  localparam int PW = $clog2(N + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  qam_mode_e    mode,
  input  logic         cw_valid,
  output logic         cw_ready,
  input  logic [N-1:0] cw,
  output logic         sym_valid,
  input  logic         sym_ready,
  output logic [5:0]   sym_bits,
  output logic         sym_last
);

  logic [N-1:0] buf_q;
  qam_mode_e    mode_q;
  logic         busy;
  logic [PW-1:0] ptr_u, ptr_s, ptr_p;   // next unused-systematic / reordered-systematic / parity bit
  logic [2:0]   bps, half;
  logic         in_plain;

  assign bps      = (mode_q == MOD_64QAM) ? 3'd6 : 3'd4;
  assign half     = (mode_q == MOD_64QAM) ? 3'd3 : 3'd2;
  assign in_plain = (int'(ptr_u) < U);

  always_comb begin
    sym_bits = '0;
    for (int p = 0; p < 6; p++) begin
      if (p < int'(bps)) begin
        if (in_plain)
          sym_bits[p] = buf_q[int'(ptr_u) + p];
        else if (is_priority_pos(mode_q, p))
          sym_bits[p] = buf_q[U + int'(ptr_s) + pos_slot(mode_q, p)];
        else
          sym_bits[p] = buf_q[K + int'(ptr_p) + pos_slot(mode_q, p)];
      end
    end
  end

  assign sym_valid = busy;
  assign sym_last  = busy && !in_plain && (int'(ptr_s) + int'(half) >= NP);
  assign cw_ready  = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      buf_q  <= '0;
      mode_q <= MOD_16QAM;
      ptr_u  <= '0;
      ptr_s  <= '0;
      ptr_p  <= '0;
    end else if (!busy) begin
      if (cw_valid) begin
        busy   <= 1'b1;
        buf_q  <= cw;
        mode_q <= mode;
        ptr_u  <= '0;
        ptr_s  <= '0;
        ptr_p  <= '0;
      end
    end else if (sym_ready) begin
      if (in_plain) begin
        ptr_u <= ptr_u + PW'(bps);
      end else begin
        ptr_s <= ptr_s + PW'(half);
        ptr_p <= ptr_p + PW'(half);
        if (sym_last) busy <= 1'b0;
      end
    end
  end

  initial begin
    assert (U >= 0 && U % 12 == 0 && (2 * NP) % 12 == 0)
      else $error("uep_reorder: code-word parts do not fill whole 16/64-QAM symbols");
  end

endmodule
