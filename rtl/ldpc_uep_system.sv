// ldpc_uep_system: IEEE 802.11n LDPC transceiver with unequal error
// protection (UEP), optimized scaling factor (OSF) and failed-check-node (FCN)
// decoding.
//
// Transmit chain:  message -> ldpc_encoder -> uep_reorder -> qam_mapper -> tx
// Receive chain:   rx -> qam_demapper -> uep_restore -> ldpc_msa_decoder
//                  with alpha from osf_lut(code, rate, modulation, Eb/N0)
// The channel between tx and rx is outside this module. The two chains share
// only the modulation select; a loop-back testbench connects tx to rx through
// a noise model.
//
// Interface:
//   mode        16-QAM or 64-QAM, for both chains; change it only between
//               code-words.
//   ebn0_hdb    receiver's Eb/N0 estimate in half-dB steps, read when a
//               code-word of LLRs is handed to the decoder.
//   msg_*       K message bits per code-word, valid/ready.
//   tx_*        one QAM symbol per cycle as integer levels (+-1, +-3, ...),
//               valid/ready.
//   rx_*        one received sample per cycle, RX_FRAC fractional bits, in
//               units of the constellation level, valid/ready (rx_ready is low
//               while a full code-word waits for the decoder).
//   dec_*       decoded message with success flag (zero syndrome), number of
//               iterations, minimum FCN count and the alpha used; dec_valid is
//               a one-cycle pulse.
// Code length and rate follow ldpc_pkg (648, rate 1/2 with Z = 27); the OSF
// table row is picked to match.
module ldpc_uep_system
  import ldpc_pkg::*;
#(
  parameter int Z       = Z_DEFAULT,
  parameter int LLR_W   = 8,
  parameter int IMAX    = 20,
  parameter int RX_W    = 10,
  parameter int RX_FRAC = 3,
  localparam int N      = NB * Z,
  localparam int K      = KB * Z,
  localparam int M      = MB * Z,
  localparam int IW     = $clog2(IMAX + 1),
  localparam int CW     = $clog2(M + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  qam_mode_e              mode,
  input  logic [5:0]             ebn0_hdb,
  // transmitter
  input  logic                   msg_valid,
  output logic                   msg_ready,
  input  logic [K-1:0]           msg,
  output logic                   tx_valid,
  input  logic                   tx_ready,
  output logic signed [3:0]      tx_i,
  output logic signed [3:0]      tx_q,
  // receiver
  input  logic                   rx_valid,
  output logic                   rx_ready,
  input  logic signed [RX_W-1:0] rx_i,
  input  logic signed [RX_W-1:0] rx_q,
  output logic                   dec_valid,
  output logic [K-1:0]           dec_msg,
  output logic                   dec_success,
  output logic [IW-1:0]          dec_iters,
  output logic [CW-1:0]          dec_fcn_min,
  output logic [3:0]             dec_alpha
);

  // OSF table selection for the code in ldpc_pkg
  localparam logic       LEN_SEL  = (N == 1296);
  localparam logic [1:0] RATE_SEL = (2 * KB == NB) ? 2'd0 : (3 * KB == 2 * NB) ? 2'd1 : 2'd2;

  // ---------------- transmit chain ----------------
  logic         enc_valid, enc_ready;
  logic [N-1:0] enc_cw;
  logic         ro_valid, ro_ready, ro_last;
  logic [5:0]   ro_bits;

  ldpc_encoder #(.Z(Z)) u_enc (
    .clk, .rst_n,
    .in_valid (msg_valid), .in_ready (msg_ready), .in_msg (msg),
    .out_valid(enc_valid), .out_ready(enc_ready), .out_cw (enc_cw)
  );

  uep_reorder #(.N(N), .K(K)) u_reorder (
    .clk, .rst_n, .mode,
    .cw_valid (enc_valid), .cw_ready (enc_ready), .cw (enc_cw),
    .sym_valid(ro_valid), .sym_ready(ro_ready), .sym_bits(ro_bits), .sym_last(ro_last)
  );

  qam_mapper u_map (
    .clk, .rst_n, .mode,
    .in_valid (ro_valid), .in_ready (ro_ready), .in_bits (ro_bits),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_i (tx_i), .out_q (tx_q)
  );

  // ---------------- receive chain ----------------
  logic                    dm_valid, dm_ready;
  logic signed [LLR_W-1:0] dm_llr [6];
  logic                    fr_valid;
  logic signed [LLR_W-1:0] fr_llr [N];
  logic                    dec_ready;
  logic [N-1:0]            dec_cw;
  logic [3:0]              alpha;

  qam_demapper #(.RX_W(RX_W), .FRAC(RX_FRAC), .LLR_W(LLR_W)) u_demap (
    .clk, .rst_n, .mode,
    .in_valid (rx_valid), .in_ready (rx_ready), .rx_i, .rx_q,
    .out_valid(dm_valid), .out_ready(dm_ready), .out_llr(dm_llr)
  );

  uep_restore #(.N(N), .K(K), .LLR_W(LLR_W)) u_restore (
    .clk, .rst_n, .mode,
    .sym_valid  (dm_valid), .sym_ready (dm_ready), .sym_llr (dm_llr),
    .frame_valid(fr_valid), .frame_ready(dec_ready), .frame_llr(fr_llr)
  );

  osf_lut u_osf (
    .len_sel (LEN_SEL), .rate_sel (RATE_SEL), .mode, .ebn0_hdb, .alpha
  );

  ldpc_msa_decoder #(.Z(Z), .LLR_W(LLR_W), .IMAX(IMAX)) u_dec (
    .clk, .rst_n,
    .start   (fr_valid), .ready (dec_ready),
    .llr_in  (fr_llr), .alpha_in (alpha),
    .done    (dec_valid), .cw_out (dec_cw), .msg_out (dec_msg),
    .success (dec_success), .iters (dec_iters), .fcn_min (dec_fcn_min)
  );

  // alpha of the code-word being decoded / last decoded
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    dec_alpha <= '0;
    else if (fr_valid && dec_ready) dec_alpha <= alpha;
  end

endmodule
