// uep_restore: receive-side inverse of uep_reorder, on soft bits.
//
// Soft bits arrive one QAM symbol per cycle (soft bit of b0 at index 0). Each
// is written back to its original code-word position: the first (Ns-Np)/bps
// symbols carry the untouched systematic bits in order; in the rest, the
// prioritized positions (16-QAM b0,b2; 64-QAM b0,b1,b3) carry the last Np
// systematic bits and the other positions the parity bits, in code-word order.
// When the last symbol of a code-word is written, the whole code-word of LLRs
// is presented on frame_llr with frame_valid until frame_ready; no symbol is
// accepted meanwhile (sym_ready low).
//
// mode must stay constant during a code-word.
module uep_restore
  import ldpc_pkg::*;
#(
  parameter int N     = NB * Z_DEFAULT,
  parameter int K     = KB * Z_DEFAULT,
  parameter int LLR_W = 8,
  localparam int NP = N - K,
  localparam int U  = K - NP,
  localparam int PW = $clog2(N + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  qam_mode_e               mode,
  input  logic                    sym_valid,
  output logic                    sym_ready,
  input  logic signed [LLR_W-1:0] sym_llr [6],
  output logic                    frame_valid,
  input  logic                    frame_ready,
  output logic signed [LLR_W-1:0] frame_llr [N]
);

  logic [PW-1:0] ptr_u, ptr_s, ptr_p;
  logic [2:0]    bps, half;
  logic          in_plain, last;

  assign bps       = (mode == MOD_64QAM) ? 3'd6 : 3'd4;
  assign half      = (mode == MOD_64QAM) ? 3'd3 : 3'd2;
  assign in_plain  = (int'(ptr_u) < U);
  assign last      = !in_plain && (int'(ptr_s) + int'(half) >= NP);
  assign sym_ready = !frame_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_valid <= 1'b0;
      ptr_u <= '0;
      ptr_s <= '0;
      ptr_p <= '0;
      for (int i = 0; i < N; i++) frame_llr[i] <= '0;
    end else if (frame_valid) begin
      if (frame_ready) frame_valid <= 1'b0;
    end else if (sym_valid) begin
      for (int p = 0; p < 6; p++) begin
        if (p < int'(bps)) begin
          if (in_plain)
            frame_llr[int'(ptr_u) + p] <= sym_llr[p];
          else if (is_priority_pos(mode, p))
            frame_llr[U + int'(ptr_s) + pos_slot(mode, p)] <= sym_llr[p];
          else
            frame_llr[K + int'(ptr_p) + pos_slot(mode, p)] <= sym_llr[p];
        end
      end
      if (in_plain) begin
        ptr_u <= ptr_u + PW'(bps);
      end else if (last) begin
        ptr_u <= '0;
        ptr_s <= '0;
        ptr_p <= '0;
        frame_valid <= 1'b1;
      end else begin
        ptr_s <= ptr_s + PW'(half);
        ptr_p <= ptr_p + PW'(half);
      end
    end
  end

endmodule
