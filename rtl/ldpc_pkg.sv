// Shared types and constants of the QC-EIRA LDPC encoder.
//
// The encoder targets the IEEE 802.11n rate-1/2 codes: a base matrix of
// N_BLK = 24 block columns and M_BLK = 12 block rows, expanded with circulant
// sub-blocks of Z = 27, 54 or 81 bits (codeword lengths 648, 1296 and 1944).
// H = [H1 H2]: H1 (12 x 12 blocks) multiplies the information bits, H2 is the
// EIRA parity part: its first block column holds shift 1 in row 0, shift 0 in
// row M_BLK/2 and shift 1 in row M_BLK-1, the other columns form a dual
// diagonal of identity blocks.  Only H1 needs a table; the H2 structure is
// fixed in the parity substitution unit.
//
// H1_SHIFT holds the circulant shift of each H1 block, -1 for a zero block.
// A shift s stands for the identity rotated so that (P^s x)[k] = x[(k+s) mod Z].
// The values are the rate-1/2 prototype matrices of IEEE 802.11n, transcribed
// from the standard; check them against it where bit-exact compatibility
// matters.  The two-stage architecture works for any table whose H2 part has
// the structure above.  Storing rate 1/2 only is this design's choice.
package ldpc_pkg;

  localparam int Z_MAX  = 81;           // largest sub-block size
  localparam int N_BLK  = 24;           // block columns of H (codeword sub-blocks)
  localparam int M_BLK  = 12;           // block rows of H (parity sub-blocks)
  localparam int K_BLK  = N_BLK - M_BLK; // information sub-blocks
  localparam int N_Z    = 3;            // number of supported sub-block sizes
  localparam int SHW    = 7;            // width of a shift value (0..80)

  // Sub-block length select.
  typedef enum logic [1:0] {
    Z27 = 2'd0,
    Z54 = 2'd1,
    Z81 = 2'd2
  } zsel_e;

  // One entry of the H1 ROM: a non-zero flag and the circulant shift.
  typedef struct packed {
    logic           nz;
    logic [SHW-1:0] shift;
  } h_entry_t;

  function automatic int z_of(zsel_e zs);
    case (zs)
      Z27:     return 27;
      Z54:     return 54;
      default: return 81;
    endcase
  endfunction

  localparam int H1_SHIFT [N_Z][M_BLK][K_BLK] = '{
    // Z = 27 (n = 648)
    '{'{ 0, -1, -1, -1,  0,  0, -1, -1,  0, -1, -1,  0},
      '{22,  0, -1, -1, 17, -1,  0,  0, 12, -1, -1, -1},
      '{ 6, -1,  0, -1, 10, -1, -1, -1, 24, -1,  0, -1},
      '{ 2, -1, -1,  0, 20, -1, -1, -1, 25,  0, -1, -1},
      '{23, -1, -1, -1,  3, -1, -1, -1,  0, -1,  9, 11},
      '{24, -1, 23,  1, 17, -1,  3, -1, 10, -1, -1, -1},
      '{25, -1, -1, -1,  8, -1, -1, -1,  7, 18, -1, -1},
      '{13, 24, -1, -1,  0, -1,  8, -1,  6, -1, -1, -1},
      '{ 7, 20, -1, 16, 22, 10, -1, -1, 23, -1, -1, -1},
      '{11, -1, -1, -1, 19, -1, -1, -1, 13, -1,  3, 17},
      '{25, -1,  8, -1, 23, 18, -1, 14,  9, -1, -1, -1},
      '{ 3, -1, -1, -1, 16, -1, -1,  2, 25,  5, -1, -1}},
    // Z = 54 (n = 1296)
    '{'{40, -1, -1, -1, 22, -1, 49, 23, 43, -1, -1, -1},
      '{50,  1, -1, -1, 48, 35, -1, -1, 13, -1, 30, -1},
      '{39, 50, -1, -1,  4, -1,  2, -1, -1, -1, -1, 49},
      '{33, -1, -1, 38, 37, -1, -1,  4,  1, -1, -1, -1},
      '{45, -1, -1, -1,  0, 22, -1, -1, 20, 42, -1, -1},
      '{51, -1, -1, 48, 35, -1, -1, -1, 44, -1, 18, -1},
      '{47, 11, -1, -1, -1, 17, -1, -1, 51, -1, -1, -1},
      '{ 5, -1, 25, -1,  6, -1, 45, -1, 13, 40, -1, -1},
      '{33, -1, -1, 34, 24, -1, -1, -1, 23, -1, -1, 46},
      '{ 1, -1, 27, -1,  1, -1, -1, -1, 38, -1, 44, -1},
      '{-1, 18, -1, -1, 23, -1, -1,  8,  0, 35, -1, -1},
      '{49, -1, 17, -1, 30, -1, -1, -1, 34, -1, -1, 19}},
    // Z = 81 (n = 1944)
    '{'{57, -1, -1, -1, 50, -1, 11, -1, 50, -1, 79, -1},
      '{ 3, -1, 28, -1,  0, -1, -1, -1, 55,  7, -1, -1},
      '{30, -1, -1, -1, 24, 37, -1, -1, 56, 14, -1, -1},
      '{62, 53, -1, -1, 53, -1, -1,  3, 35, -1, -1, -1},
      '{40, -1, -1, 20, 66, -1, -1, 22, 28, -1, -1, -1},
      '{ 0, -1, -1, -1,  8, -1, 42, -1, 50, -1, -1,  8},
      '{69, 79, 79, -1, -1, -1, 56, -1, 52, -1, -1, -1},
      '{65, -1, -1, -1, 38, 57, -1, -1, 72, -1, 27, -1},
      '{64, -1, -1, -1, 14, 52, -1, -1, 30, -1, -1, 32},
      '{-1, 45, -1, 70,  0, -1, -1, -1, 77,  9, -1, -1},
      '{ 2, 56, -1, 57, 35, -1, -1, -1, -1, -1, 12, -1},
      '{24, -1, 61, -1, 60, -1, -1, 27, 51, -1, -1, 16}}
  };

endpackage
