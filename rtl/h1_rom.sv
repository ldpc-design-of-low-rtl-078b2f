// h1_rom: read-only store of the information part H1 of the parity check
// matrix, one table per supported sub-block size.
//
// A read returns a whole block column j of H1 for the selected size: for
// every block row i a non-zero flag and the circulant shift of block (i, j).
// The column-wise multiplier needs all rows of a column while that column's
// information sub-block is processed, hence the column-wide read port.  The
// contents come from ldpc_pkg::H1_SHIFT (IEEE 802.11n, rate 1/2).  The read
// is combinational (an asynchronous ROM); that, and storing the shift as a
// plain binary number, are choices of this design.
//
// Ports: zsel (size), col (block column, 0..K_BLK-1), ent[M_BLK] (entries).
module h1_rom
  import ldpc_pkg::*;
(
  input  zsel_e                      zsel,
  input  logic [$clog2(K_BLK)-1:0]   col,
  output h_entry_t                   ent [M_BLK]
);

  logic [1:0]               zi;
  logic [$clog2(K_BLK)-1:0] ci;

  always_comb begin
    zi = (int'(zsel) < N_Z) ? 2'(zsel) : 2'(N_Z - 1);
    ci = (int'(col) < K_BLK) ? col : ($bits(ci))'(K_BLK - 1);
    for (int i = 0; i < M_BLK; i++) begin
      ent[i].nz    = (H1_SHIFT[zi][i][ci] >= 0);
      ent[i].shift = ent[i].nz ? SHW'(H1_SHIFT[zi][i][ci]) : '0;
    end
  end

endmodule
