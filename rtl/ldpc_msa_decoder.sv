// ldpc_msa_decoder: Min-Sum LDPC decoder with optimized scaling factor (OSF)
// and failed-check-node (FCN) output selection, for the quasi-cyclic code held
// in ldpc_pkg.
//
// Algorithm (flooding schedule, one iteration = one CN and one VN cycle):
//   load : r_i = channel LLR, M(j,i) = r_i on every edge of H.
//   CN   : E(j,i) = alpha * prod_{i'!=i} sign(M(j,i')) * min_{i'!=i} |M(j,i')|
//   VN   : L_i = r_i + sum_j E(j,i); hard bit z_i = (L_i < 0);
//          syndrome s = H z^T; FCN count = number of ones in s;
//          M(j,i) = L_i - alpha * E(j,i)
//   stop : when s = 0 or after IMAX iterations. The output is the FCN memory
//          X (see fcn_select): the zero-syndrome word, or the word of the
//          iteration with the fewest failed check nodes.
// The same alpha scales both the check-node output and the extrinsic term
// removed in the bit-node update, as the OSF scheme prescribes; alpha comes
// from the OSF lookup table for the signal's Eb/N0.
//
// The architecture is fully parallel: every edge has its own M and E register
// and every check and bit node its own logic. Edge storage is indexed
// [base row][base column][row within block]; blocks that are zero in H are
// never read. Fixed-point choices (this design's own): LLRs and messages are
// LLR_W-bit two's complement saturated to +-(2^(LLR_W-1)-1); alpha * x is
// computed as sign(x) * floor(|x| * alpha_tenths / 10); L_i is kept at full
// width.
//
// Interface and timing: when ready, start loads llr_in and alpha_in (tenths,
// values above 10 are treated as 10). done is a one-cycle pulse set by the
// clock edge 2*iters + 1 edges after the edge that accepts start (a
// synchronous reader samples it at edge 2*iters + 2); cw_out, msg_out (the K systematic bits),
// success (zero syndrome reached), iters and fcn_min are valid from then until
// the next start.
module ldpc_msa_decoder
  import ldpc_pkg::*;
#(
  parameter int Z     = Z_DEFAULT,
  parameter int LLR_W = 8,
  parameter int IMAX  = 20,
  localparam int N    = NB * Z,
  localparam int K    = KB * Z,
  localparam int M    = MB * Z,
  localparam int IW   = $clog2(IMAX + 1),
  localparam int CW   = $clog2(M + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    ready,
  input  logic signed [LLR_W-1:0] llr_in [N],
  input  logic [3:0]              alpha_in,
  output logic                    done,
  output logic [N-1:0]            cw_out,
  output logic [K-1:0]            msg_out,
  output logic                    success,
  output logic [IW-1:0]           iters,
  output logic [CW-1:0]           fcn_min
);

  localparam int MAXMAG = (1 << (LLR_W - 1)) - 1;

  typedef enum logic [1:0] {S_IDLE, S_CN, S_VN, S_FIN} state_e;
  state_e state;

  logic signed [LLR_W-1:0] r_q [N];
  logic signed [LLR_W-1:0] m_q [MB][NB][Z];
  logic signed [LLR_W-1:0] e_q [MB][NB][Z];
  logic signed [LLR_W-1:0] e_d [MB][NB][Z];
  logic signed [LLR_W-1:0] m_d [MB][NB][Z];
  logic [3:0]              alpha_q;
  logic [N-1:0]            hard;
  logic [N-1:0]            hard_in;
  logic [M-1:0]            synd;
  logic [CW-1:0]           fcn_count;

  // alpha * v, truncated toward zero (odd function of v)
  function automatic int scale(int v, logic [3:0] a);
    int mag;
    mag = (v < 0) ? -v : v;
    mag = (mag * int'(a)) / 10;
    return (v < 0) ? -mag : mag;
  endfunction

  // ---------------- check-node update (eq. 8) ----------------
  always_comb begin
    for (int br = 0; br < MB; br++)
      for (int bc = 0; bc < NB; bc++)
        for (int z = 0; z < Z; z++)
          e_d[br][bc][z] = '0;
    for (int br = 0; br < MB; br++) begin
      for (int z = 0; z < Z; z++) begin
        int   min1, min2, idx, mag;
        logic sgn;
        mag  = 0;
        min1 = MAXMAG;
        min2 = MAXMAG;
        idx  = -1;
        sgn  = 1'b0;
        for (int bc = 0; bc < NB; bc++) begin
          if (H_BASE[br][bc] >= 0) begin
            mag = int'(m_q[br][bc][z]);
            sgn ^= (mag < 0);
            if (mag < 0) mag = -mag;
            if (mag < min1) begin
              min2 = min1;
              min1 = mag;
              idx  = bc;
            end else if (mag < min2) begin
              min2 = mag;
            end
          end
        end
        for (int bc = 0; bc < NB; bc++) begin
          if (H_BASE[br][bc] >= 0) begin
            mag = (bc == idx) ? min2 : min1;
            if (sgn ^ m_q[br][bc][z][LLR_W-1]) mag = -mag;
            e_d[br][bc][z] = LLR_W'(scale(mag, alpha_q));
          end
        end
      end
    end
  end

  // ---------------- bit-node update (eqs. 9, 11) and hard decision ----------------
  always_comb begin
    hard = '0;
    for (int br = 0; br < MB; br++)
      for (int bc = 0; bc < NB; bc++)
        for (int z = 0; z < Z; z++)
          m_d[br][bc][z] = '0;
    for (int bc = 0; bc < NB; bc++) begin
      for (int zc = 0; zc < Z; zc++) begin
        int total;
        int zr;
        zr    = 0;
        total = int'(r_q[bc*Z + zc]);
        for (int br = 0; br < MB; br++) begin
          if (H_BASE[br][bc] >= 0) begin
            zr = (zc - (H_BASE[br][bc] % Z) + Z) % Z;
            total += int'(e_q[br][bc][zr]);
          end
        end
        hard[bc*Z + zc] = (total < 0);
        for (int br = 0; br < MB; br++) begin
          if (H_BASE[br][bc] >= 0) begin
            zr = (zc - (H_BASE[br][bc] % Z) + Z) % Z;
            m_d[br][bc][zr] = LLR_W'(sat_sym(total - scale(int'(e_q[br][bc][zr]), alpha_q), LLR_W));
          end
        end
      end
    end
  end

  // ---------------- syndrome (eq. 10) ----------------
  always_comb begin
    for (int br = 0; br < MB; br++) begin
      for (int z = 0; z < Z; z++) begin
        logic s;
        s = 1'b0;
        for (int bc = 0; bc < NB; bc++)
          if (H_BASE[br][bc] >= 0)
            s ^= hard[bc*Z + ((z + H_BASE[br][bc]) % Z)];
        synd[br*Z + z] = s;
      end
    end
  end

  // channel hard decision, the initial content of the FCN memory
  always_comb
    for (int i = 0; i < N; i++) hard_in[i] = llr_in[i][LLR_W-1];

  fcn_select #(.M(M), .N(N)) u_fcn (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (start && state == S_IDLE),
    .init_cw  (hard_in),
    .update   (state == S_VN),
    .syndrome (synd),
    .cw_in    (hard),
    .fcn_count(fcn_count),
    .fcn_min  (fcn_min),
    .x_cw     (cw_out),
    .improved ()
  );

  assign ready   = (state == S_IDLE);
  assign msg_out = cw_out[K-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      alpha_q <= '0;
      iters   <= '0;
      success <= 1'b0;
      done    <= 1'b0;
      for (int i = 0; i < N; i++) r_q[i] <= '0;
      for (int br = 0; br < MB; br++)
        for (int bc = 0; bc < NB; bc++)
          for (int z = 0; z < Z; z++) begin
            m_q[br][bc][z] <= '0;
            e_q[br][bc][z] <= '0;
          end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          alpha_q <= (alpha_in > 4'd10) ? 4'd10 : alpha_in;
          iters   <= '0;
          success <= 1'b0;
          for (int i = 0; i < N; i++) r_q[i] <= LLR_W'(sat_sym(int'(llr_in[i]), LLR_W));
          for (int br = 0; br < MB; br++)
            for (int bc = 0; bc < NB; bc++)
              if (H_BASE[br][bc] >= 0)
                for (int z = 0; z < Z; z++)
                  m_q[br][bc][z] <= LLR_W'(sat_sym(int'(llr_in[bc*Z + ((z + H_BASE[br][bc]) % Z)]), LLR_W));
          state <= S_CN;
        end
        S_CN: begin
          e_q   <= e_d;
          state <= S_VN;
        end
        S_VN: begin
          m_q   <= m_d;
          iters <= iters + 1'b1;
          if (fcn_count == '0 || int'(iters) + 1 >= IMAX) begin
            success <= (fcn_count == '0);
            state   <= S_FIN;
          end else begin
            state <= S_CN;
          end
        end
        S_FIN: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
