// mpsu: multiple parity substitution unit, second pipeline stage.
//
// Solves H2 * P^T = H1 * I^T = q for the parity sub-blocks.  H2 has the EIRA
// form: block column 0 holds P^1 in row 0, the identity in row m/2 and P^1 in
// row m-1; the remaining columns are a dual diagonal of identities.  Summing
// all block rows gives p0 = q_0 + ... + q_(m-1).  The rest follow from two
// running sums, a forward one from the top and a backward one from the bottom,
// which halves the length of the XOR chain:
//   f_0 = q_0 + q_1,         f_i = f_(i-1) + q_(i+1),      0 <= i <= m/2-2
//   b_0 = q_(m-1) + q_(m-2), b_i = b_(i-1) + q_(m-2-i),    0 <= i <= m/2-3
//   p0  = f_(m/2-2) + b_(m/2-3) + q_(m/2),   p0' = P^1 p0
//   p_1 = p0' + q_0,  p_i = p0' + f_(i-2)  (2 <= i <= m/2)
//   p_(m-1) = p0' + q_(m-1),  p_j = p0' + b_(m-2-j)  (m/2+1 <= j <= m-2)
// Every one of these is a bitwise XOR of sub-blocks, so the unit works on
// M_PAR bit positions k of all sub-blocks per clock (M_PAR lanes), and takes
// ceil(Z/M_PAR) clocks per codeword.  p0' at bit k is p0 at bit (k+1) mod Z;
// each lane forms it as the XOR of all q_i at that bit, as q is held whole in
// the H1I buffer.  The substitution equations follow the document; the lane
// organisation and this p0' tap are this design's choice.
//
// Timing: start (one clock, while idle or in the finishing clock) begins a
// codeword; busy is high for ceil(Z/M_PAR) clocks, each writing one group of
// bit positions to the parity buffer (wr_en, wr_idx, wr_bits).  finish is high
// in the last busy clock, together with the last write.
module mpsu
  import ldpc_pkg::*;
#(
  parameter int M_PAR = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  zsel_e                   zsel,
  input  logic [Z_MAX-1:0]        q       [M_BLK],
  output logic                    busy,
  output logic                    finish,
  output logic                    wr_en,
  output logic [$clog2(Z_MAX)-1:0] wr_idx,
  output logic [M_PAR-1:0]        wr_bits [M_BLK]
);

  localparam int H  = M_BLK / 2;
  localparam int IW = $clog2(Z_MAX);

  logic [IW-1:0] k;       // first bit position of this clock
  int            z;
  logic          last;

  always_comb begin
    z    = z_of(zsel);
    last = busy && (int'(k) + M_PAR >= z);
  end

  assign finish = last;
  assign wr_en  = busy;
  assign wr_idx = k;

  // one substitution lane per bit position k + l
  for (genvar l = 0; l < M_PAR; l++) begin : g_lane
    always_comb begin
      int          idx;
      int          idx1;
      logic        qb  [M_BLK];
      logic        f   [H-1];
      logic        b   [H-2];
      logic        p0;
      logic        p0s;
      idx  = int'(k) + l;
      idx1 = (idx + 1 >= z) ? idx + 1 - z : idx + 1;
      p0s  = 1'b0;
      for (int i = 0; i < M_BLK; i++) begin
        qb[i] = q[i][idx % Z_MAX];
        p0s   = p0s ^ q[i][idx1 % Z_MAX];
      end
      // forward and backward substitution
      f[0] = qb[0] ^ qb[1];
      for (int i = 1; i <= H - 2; i++) f[i] = f[i-1] ^ qb[i+1];
      b[0] = qb[M_BLK-1] ^ qb[M_BLK-2];
      for (int i = 1; i <= H - 3; i++) b[i] = b[i-1] ^ qb[M_BLK-2-i];
      p0 = f[H-2] ^ b[H-3] ^ qb[H];
      // parity bits
      wr_bits[0][l] = p0;
      wr_bits[1][l] = p0s ^ qb[0];
      for (int i = 2; i <= H; i++) wr_bits[i][l] = p0s ^ f[i-2];
      for (int j = H + 1; j <= M_BLK - 2; j++) wr_bits[j][l] = p0s ^ b[M_BLK-2-j];
      wr_bits[M_BLK-1][l] = p0s ^ qb[M_BLK-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
    end else if (start) begin
      busy <= 1'b1;
      k    <= '0;
    end else if (busy) begin
      if (last) begin
        busy <= 1'b0;
        k    <= '0;
      end else begin
        k <= k + IW'(M_PAR);
      end
    end
  end

  // a new codeword is only started while idle or in the last clock of the current one
  a_start_when_free: assert property (@(posedge clk) disable iff (!rst_n) start |-> (!busy || last));

endmodule
