// dcs: decomposed cyclic shifter.
//
// Multiplies one information sub-block by a circulant permutation matrix of
// size Z x Z, i.e. rotates the Z valid bits of x: y[k] = x[(k + shift) mod Z].
// One shifter serves every supported length (27, 54 or 81 bits) by splitting
// the rotation in two steps:
//   step 1 (coarse)  shift = u*TINY + r.  The vector is cut into Z/TINY tiny
//                    sub-blocks of TINY bits and these are rotated by u
//                    positions, wrapping after Z/TINY of them.
//   step 2 (fine)    the result is rotated by r < TINY bits with a
//                    logarithmic shifter.  Its input is extended by TINY-1
//                    bits above position Z-1; switches fill those bits with
//                    the low bits of the vector, at a position that depends
//                    on the selected length, so the same shifter wraps
//                    correctly for every length.
// The two-step decomposition and the length-dependent switches follow the
// document; TINY = 27 (the greatest common divisor of the three lengths) is
// this design's choice.  Purely combinational, no clock.
//
// Ports: x (Z_MAX bits, valid bits [Z-1:0]), zsel (length), shift (0..Z-1),
// y (Z_MAX bits, bits at and above Z are zero).
module dcs
  import ldpc_pkg::*;
#(
  parameter int Z_MAX_P = Z_MAX,
  parameter int TINY    = 27
) (
  input  logic [Z_MAX_P-1:0] x,
  input  zsel_e              zsel,
  input  logic [SHW-1:0]     shift,
  output logic [Z_MAX_P-1:0] y
);

  localparam int NB_MAX = Z_MAX_P / TINY;     // tiny sub-blocks at Z_MAX
  localparam int RW     = $clog2(TINY);       // fine shift width
  localparam int EW     = Z_MAX_P + TINY - 1; // extended vector for step 2

  logic [$clog2(NB_MAX+1)-1:0] u;    // coarse shift, in tiny sub-blocks
  logic [RW-1:0]                r;    // fine shift, in bits
  logic [Z_MAX_P-1:0]           x1;   // after step 1
  logic [EW-1:0]                ext;  // step 2 input with wrap-around bits
  int                           z;
  int                           nb;

  always_comb begin
    z  = z_of(zsel);
    nb = z / TINY;

    // shift = u*TINY + r
    u = '0;
    r = RW'(shift);
    for (int i = 1; i < NB_MAX; i++)
      if (int'(shift) >= i * TINY) begin
        u = ($bits(u))'(i);
        r = RW'(int'(shift) - i * TINY);
      end

    // Step 1: output tiny sub-block b takes input sub-block (b + u) mod nb.
    x1 = '0;
    for (int n = 1; n <= NB_MAX; n++)
      if (nb == n)
        for (int b = 0; b < n; b++)
          for (int c = 0; c < n; c++)
            if (int'(u) == c) x1[b*TINY +: TINY] = x[((b + c) % n)*TINY +: TINY];

    // Step 2: switches fill the TINY-1 bits above position Z-1 with the
    // lowest bits, at the place that matches the selected length ...
    ext = '0;
    ext[Z_MAX_P-1:0] = x1;
    for (int n = 1; n <= NB_MAX; n++)
      if (nb == n)
        for (int t = 0; t < TINY - 1; t++) ext[n*TINY + t] = x1[t];
    // ... and a logarithmic shifter rotates by r bits.
    for (int s = 0; s < RW; s++)
      if (r[s]) ext = ext >> (1 << s);

    for (int k = 0; k < Z_MAX_P; k++)
      y[k] = (k < z) ? ext[k] : 1'b0;
  end

endmodule
