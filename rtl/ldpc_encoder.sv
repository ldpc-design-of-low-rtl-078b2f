// ldpc_encoder: two-stage pipelined QC-EIRA LDPC encoder for the IEEE 802.11n
// rate-1/2 codes (n = 648, 1296, 1944; sub-block size Z = 27, 54, 81).
//
// Stage 1, the CMMU, computes q = H1 * I^T column by column while the
// information bits stream in, using decomposed cyclic shifters (DCS) and the
// H1 ROM.  The controller then hands q and the information bits to the H1I
// buffer and starts stage 2, the MPSU, which solves the EIRA parity part by
// forward/backward substitution, M_PAR bit positions per clock, into the
// parity buffer.  Stage 1 meanwhile accepts the next codeword.
//
// Interface:
//   zsel_in, in_valid, in_data[IN_W], in_ready   information bits, K_BLK
//       sub-blocks of Z bits, each in ceil(Z/IN_W) words, lowest bit first;
//       zsel_in is sampled with the first word of a codeword.
//   cw_valid, cw_zsel, cw[N_BLK]   one-clock pulse with the codeword
//       [I P]: cw[0..K_BLK-1] information, cw[K_BLK..N_BLK-1] parity
//       sub-blocks, each in bits [Z-1:0].
//   n_started, n_done               codewords handed to stage 2 / completed.
// Timing: the second stage takes ceil(Z/M_PAR) clocks per codeword and, as the
// input side needs K_BLK*ceil(Z/IN_W) clocks, sets the throughput:
// one codeword every Z clocks with the defaults.  cw_valid follows the last
// information word by Z + 3 clocks when the second stage is idle.
// The two-stage split, the column-wise first stage, the DCS and the
// substitution equations follow the published architecture; the word
// framing, handshakes, codeword output format and reset are this design's.
module ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter int IN_W  = 20,
  parameter int N_DCS = 12,
  parameter int M_PAR = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  zsel_e            zsel_in,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             in_ready,
  output logic             cw_valid,
  output zsel_e            cw_zsel,
  output logic [Z_MAX-1:0] cw [N_BLK],
  output logic [15:0]      n_started,
  output logic [15:0]      n_done
);

  localparam int IW = $clog2(Z_MAX);

  logic             cmmu_start, cmmu_finish, buf_load, mpsu_start;
  logic             mpsu_busy, mpsu_finish, wr_en;
  logic [IW-1:0]    wr_idx;
  logic [M_PAR-1:0] wr_bits [M_BLK];
  logic [Z_MAX-1:0] c_q    [M_BLK];
  logic [Z_MAX-1:0] c_info [K_BLK];
  zsel_e            c_zsel;
  logic [Z_MAX-1:0] b_q    [M_BLK];
  logic [Z_MAX-1:0] b_info [K_BLK];
  zsel_e            b_zsel;
  logic [Z_MAX-1:0] o_info [K_BLK];
  logic [Z_MAX-1:0] o_par  [M_BLK];

  cmmu #(.IN_W(IN_W), .N_DCS(N_DCS)) u_cmmu (
    .clk, .rst_n,
    .zsel_in, .in_valid, .in_data, .in_ready,
    .start  (cmmu_start),
    .finish (cmmu_finish),
    .q      (c_q),
    .info   (c_info),
    .zsel_q (c_zsel)
  );

  enc_controller u_ctrl (
    .clk, .rst_n,
    .cmmu_finish, .mpsu_finish,
    .cmmu_start, .buf_load, .mpsu_start,
    .n_started, .n_done
  );

  h1i_buffer u_h1i (
    .clk, .rst_n,
    .load    (buf_load),
    .q_in    (c_q),
    .info_in (c_info),
    .zsel_in (c_zsel),
    .q       (b_q),
    .info    (b_info),
    .zsel    (b_zsel)
  );

  mpsu #(.M_PAR(M_PAR)) u_mpsu (
    .clk, .rst_n,
    .start   (mpsu_start),
    .zsel    (b_zsel),
    .q       (b_q),
    .busy    (mpsu_busy),
    .finish  (mpsu_finish),
    .wr_en, .wr_idx, .wr_bits
  );

  parity_buffer #(.M_PAR(M_PAR)) u_par (
    .clk, .rst_n,
    .wr_en, .wr_idx, .wr_bits,
    .wr_zsel  (b_zsel),
    .commit   (mpsu_finish),
    .info_in  (b_info),
    .cw_valid,
    .cw_zsel,
    .cw_info  (o_info),
    .cw_par   (o_par)
  );

  always_comb begin
    for (int j = 0; j < K_BLK; j++) cw[j] = o_info[j];
    for (int i = 0; i < M_BLK; i++) cw[K_BLK + i] = o_par[i];
  end

  // the controller only starts the second stage when it is free
  a_stage2_free: assert property (@(posedge clk) disable iff (!rst_n)
                                  mpsu_start |-> (!mpsu_busy || mpsu_finish));

endmodule
