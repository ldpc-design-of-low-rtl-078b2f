// ldpc_ref_pkg: bit-level reference model shared by the testbenches.
//
// rot()        circulant product (P^s x)[k] = x[(k+s) mod Z], written as a
//              plain loop over bits.
// ref_q()      q = H1 * I^T, row by row over the whole of H1.
// ref_parity() parity sub-blocks from q by solving the block rows of H2 one
//              after another: p0 = sum of all q_i, p1 = P^1 p0 + q_0,
//              p_(i+1) = p_i + q_i (+ p0 in row m/2).
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  typedef logic [Z_MAX-1:0] blk_t;

  function automatic blk_t rot(blk_t x, int s, int z);
    blk_t y = '0;
    for (int k = 0; k < z; k++) y[k] = x[(k + s) % z];
    return y;
  endfunction

  function automatic void ref_q(zsel_e zs, blk_t info [K_BLK], output blk_t q [M_BLK]);
    int z = z_of(zs);
    for (int i = 0; i < M_BLK; i++) begin
      q[i] = '0;
      for (int j = 0; j < K_BLK; j++)
        if (H1_SHIFT[int'(zs)][i][j] >= 0) q[i] ^= rot(info[j], H1_SHIFT[int'(zs)][i][j], z);
    end
  endfunction

  function automatic void ref_parity(zsel_e zs, blk_t q [M_BLK], output blk_t par [M_BLK]);
    int z = z_of(zs);
    par[0] = '0;
    for (int i = 0; i < M_BLK; i++) par[0] ^= q[i];
    par[1] = rot(par[0], 1, z) ^ q[0];
    for (int i = 1; i < M_BLK - 1; i++)
      par[i+1] = par[i] ^ q[i] ^ ((i == M_BLK / 2) ? par[0] : '0);
  endfunction

  function automatic blk_t rand_blk(int z);
    blk_t b = '0;
    for (int k = 0; k < z; k++) b[k] = 1'($urandom);
    return b;
  endfunction

endpackage
