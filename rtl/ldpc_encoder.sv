// ldpc_encoder: systematic encoder for the IEEE 802.11n quasi-cyclic LDPC code
// held in ldpc_pkg (c = u.G, with the message u as the first K bits of c).
//
// Instead of a dense generator matrix, the encoder uses the structure of the
// 802.11n parity part: for every base row i it forms
//   lambda_i = sum_j P^h(i,j) u_j        (XOR of shifted message blocks)
// The first parity block follows from the sum of all lambda_i (the entries of
// the weight-3 parity column cancel in pairs); the other parity blocks follow
// row by row down the dual diagonal:
//   p_1     = lambda_0 + P^h(0,KB) p_0
//   p_(i+1) = lambda_i + P^h(i,KB) p_0 + p_i      (i >= 1)
// This is the usual way to realize the standard's generator in hardware; the
// recursion is this design's choice.
//
// Interface: valid/ready on both sides. A message accepted with
// in_valid & in_ready appears as a code-word on out_cw one cycle later with
// out_valid; it is held until out_ready. Code-word bit i is out_cw[i]; bits
// 0..K-1 are the message, K..N-1 the parity.
module ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter int Z = Z_DEFAULT,
  localparam int N = NB * Z,
  localparam int K = KB * Z
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [K-1:0] in_msg,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [N-1:0] out_cw
);

  logic [N-1:0] cw_d;

  always_comb begin
    logic [Z-1:0] lambda [MB];
    logic [Z-1:0] par    [MB];
    logic [Z-1:0] psum;
    int           d;

    // lambda_i: XOR over the message blocks of row i
    for (int i = 0; i < MB; i++) begin
      lambda[i] = '0;
      for (int j = 0; j < KB; j++)
        if (H_BASE[i][j] >= 0)
          for (int z = 0; z < Z; z++)
            lambda[i][z] ^= in_msg[j*Z + ((z + H_BASE[i][j]) % Z)];
    end

    // p_0: sum of all lambda is p_0 shifted by the residual shift d
    psum = '0;
    for (int i = 0; i < MB; i++) psum ^= lambda[i];
    d = hb_residual_shift(Z);
    for (int y = 0; y < Z; y++) par[0][y] = psum[(y - d + Z) % Z];

    // dual-diagonal back-substitution
    for (int i = 0; i < MB - 1; i++) begin
      for (int z = 0; z < Z; z++) begin
        par[i+1][z] = lambda[i][z];
        if (H_BASE[i][KB] >= 0) par[i+1][z] ^= par[0][(z + H_BASE[i][KB]) % Z];
        if (i >= 1) par[i+1][z] ^= par[i][z];
      end
    end

    cw_d[K-1:0] = in_msg;
    for (int i = 0; i < MB; i++)
      for (int z = 0; z < Z; z++)
        cw_d[K + i*Z + z] = par[i][z];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cw    <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_cw <= cw_d;
    end
  end

endmodule
