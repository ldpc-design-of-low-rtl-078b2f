// cmmu: column-wise matrix multiplication unit, first pipeline stage.
//
// Computes q = H1 * I^T while the information bits are still arriving.  The
// information block is received IN_W bits per clock, sub-block by sub-block.
// As soon as sub-block I_j is complete it is copied into a work register and
// multiplied by every non-zero block h(i,j) of block column j of H1; each
// product is added (XOR) into accumulator q_i:  q_i^j = q_i^(j-1) + h(i,j) I_j.
// N_DCS decomposed cyclic shifters work in parallel on N_DCS block rows per
// clock, so one column takes G = ceil(M_BLK / N_DCS) clocks and overlaps with
// the arrival of the next sub-block (partially parallel processing).  With the
// defaults (IN_W = 20, N_DCS = 12) a column takes one clock, and q is ready one
// clock after the last information word.
//
// Input framing (this design's choice): a sub-block of Z bits is carried by
// ceil(Z/IN_W) words, bit b of the sub-block in bit (b mod IN_W) of word
// (b div IN_W); unused bits of the last word are ignored.  Sub-blocks arrive
// in order 0..K_BLK-1.  zsel is sampled with the first word of a codeword.
// in_valid/in_ready is a valid-ready handshake: in_ready drops while a
// finished codeword waits to be handed to the second stage, and for the last
// word of a sub-block if the shifters are still busy with the previous one.
//
// Stage handshake: finish stays high from the clock after the last column is
// processed until start; start clears the accumulators for the next codeword.
// q, info and zsel_q hold the finished codeword's results while finish is high.
module cmmu
  import ldpc_pkg::*;
#(
  parameter int IN_W  = 20,
  parameter int N_DCS = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  // information bit stream
  input  zsel_e            zsel_in,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             in_ready,
  // stage control
  input  logic             start,
  output logic             finish,
  // results
  output logic [Z_MAX-1:0] q    [M_BLK],
  output logic [Z_MAX-1:0] info [K_BLK],
  output zsel_e            zsel_q
);

  localparam int G   = (M_BLK + N_DCS - 1) / N_DCS; // clocks per block column
  localparam int CW  = $clog2(K_BLK);
  localparam int WW  = $clog2(Z_MAX + 1);
  localparam int GW  = (G > 1) ? $clog2(G) : 1;

  logic [Z_MAX-1:0] asm_vec;   // sub-block being assembled
  logic [WW-1:0]    wcnt;      // word index within the sub-block
  logic [CW-1:0]    col;       // sub-block index being assembled
  logic             all_in;    // every sub-block of the codeword received
  logic [Z_MAX-1:0] work_vec;  // sub-block being multiplied
  logic [CW-1:0]    work_col;
  logic             busy;
  logic [GW-1:0]    grp;       // group of block rows handled this clock
  zsel_e            zsel_eff;

  int               z;
  int               nwords;
  logic             first_word;
  logic             last_word;
  logic             last_grp;
  logic             accept;
  logic [Z_MAX-1:0] asm_next;

  h_entry_t         ent   [M_BLK];
  logic [SHW-1:0]   dsh   [N_DCS];
  logic             den   [N_DCS];
  logic [Z_MAX-1:0] dout  [N_DCS];

  assign first_word = (col == '0) && (wcnt == '0) && !all_in;
  assign zsel_eff   = first_word ? zsel_in : zsel_q;
  assign last_grp   = (int'(grp) == G - 1);

  always_comb begin
    z         = z_of(zsel_eff);
    nwords    = (z + IN_W - 1) / IN_W;
    last_word = (int'(wcnt) == nwords - 1);
    in_ready  = !all_in && !finish && !(last_word && busy && !last_grp);
    accept    = in_valid && in_ready;
    asm_next  = asm_vec;
    for (int b = 0; b < IN_W; b++)
      if (int'(wcnt) * IN_W + b < z)
        asm_next[(int'(wcnt) * IN_W + b) % Z_MAX] = in_data[b];
  end

  h1_rom u_rom (
    .zsel (zsel_q),
    .col  (work_col),
    .ent  (ent)
  );

  for (genvar d = 0; d < N_DCS; d++) begin : g_dcs
    localparam int ROW0 = d;
    always_comb begin
      int row;
      row    = int'(grp) * N_DCS + ROW0;
      den[d] = 1'b0;
      dsh[d] = '0;
      if (row < M_BLK) begin
        den[d] = ent[row % M_BLK].nz;
        dsh[d] = ent[row % M_BLK].shift;
      end
    end
    dcs u_dcs (
      .x     (work_vec),
      .zsel  (zsel_q),
      .shift (dsh[d]),
      .y     (dout[d])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_vec  <= '0;
      wcnt     <= '0;
      col      <= '0;
      all_in   <= 1'b0;
      work_vec <= '0;
      work_col <= '0;
      busy     <= 1'b0;
      grp      <= '0;
      finish   <= 1'b0;
      zsel_q   <= Z81;
      for (int i = 0; i < M_BLK; i++) q[i] <= '0;
      for (int j = 0; j < K_BLK; j++) info[j] <= '0;
    end else begin
      // multiply the work sub-block by one group of block rows
      if (busy) begin
        for (int d = 0; d < N_DCS; d++)
          if (den[d]) q[(int'(grp) * N_DCS + d) % M_BLK] <= q[(int'(grp) * N_DCS + d) % M_BLK] ^ dout[d];
        if (last_grp) begin
          busy <= 1'b0;
          grp  <= '0;
          if (int'(work_col) == K_BLK - 1) finish <= 1'b1;
        end else begin
          grp <= grp + 1'b1;
        end
      end

      // receive information words
      if (accept) begin
        if (first_word) zsel_q <= zsel_in;
        if (last_word) begin
          info[col] <= asm_next;
          work_vec  <= asm_next;
          work_col  <= col;
          busy      <= 1'b1;
          grp       <= '0;
          asm_vec   <= '0;
          wcnt      <= '0;
          if (int'(col) == K_BLK - 1) begin
            col    <= '0;
            all_in <= 1'b1;
          end else begin
            col <= col + 1'b1;
          end
        end else begin
          asm_vec <= asm_next;
          wcnt    <= wcnt + 1'b1;
        end
      end

      // next codeword
      if (start) begin
        finish <= 1'b0;
        all_in <= 1'b0;
        for (int i = 0; i < M_BLK; i++) q[i] <= '0;
      end
    end
  end

  // start is only given to a stage that has finished
  a_start_after_finish: assert property (@(posedge clk) disable iff (!rst_n) start |-> finish);

endmodule
