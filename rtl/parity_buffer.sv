// parity_buffer: parity store and codeword output of the second stage.
//
// The parity substitution unit writes M_PAR bit positions of every parity
// sub-block per clock (wr_en, wr_idx, wr_bits); positions at or beyond the
// current sub-block size Z are dropped and those bits of the buffer are kept
// at zero.  With the last write (commit) the
// buffer also copies the information sub-blocks and the size select of the
// codeword from the H1I buffer, so the complete systematic codeword is
// presented on the clock after commit, with cw_valid high for that one clock.
// The information copy lets the H1I buffer take the next codeword in the same
// clock as the commit, which keeps the stage busy every clock.  This output
// framing is this design's choice.
//
// Ports: write side from the MPSU; cw_info/cw_par/cw_zsel hold the last
// committed codeword; cw_par changes again from the second clock after
// cw_valid, once the next codeword's writes begin.
module parity_buffer
  import ldpc_pkg::*;
#(
  parameter int M_PAR = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(Z_MAX)-1:0] wr_idx,
  input  logic [M_PAR-1:0]         wr_bits [M_BLK],
  input  zsel_e                    wr_zsel,
  input  logic                     commit,
  input  logic [Z_MAX-1:0]         info_in [K_BLK],
  output logic                     cw_valid,
  output zsel_e                    cw_zsel,
  output logic [Z_MAX-1:0]         cw_info [K_BLK],
  output logic [Z_MAX-1:0]         cw_par  [M_BLK]
);

  int z;
  assign z = z_of(wr_zsel);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M_BLK; i++) cw_par[i] <= '0;
      for (int j = 0; j < K_BLK; j++) cw_info[j] <= '0;
      cw_zsel  <= Z81;
      cw_valid <= 1'b0;
    end else begin
      cw_valid <= wr_en && commit;
      if (wr_en) begin
        for (int i = 0; i < M_BLK; i++) begin
          for (int b = 0; b < Z_MAX; b++)
            if (b >= z) cw_par[i][b] <= 1'b0;
          for (int l = 0; l < M_PAR; l++)
            if (int'(wr_idx) + l < z)
              cw_par[i][(int'(wr_idx) + l) % Z_MAX] <= wr_bits[i][l];
        end
        if (commit) begin
          cw_info <= info_in;
          cw_zsel <= wr_zsel;
        end
      end
    end
  end

endmodule
