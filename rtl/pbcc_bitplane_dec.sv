// pbcc_bitplane_dec: bit-plane decoding, rebuilds the eight pixels.
//
// Bit k of every pixel comes from one of three sources:
//   k > 7-sp : a skipped plane, rebuilt from the mode (B7 = mode[1],
//              B6 = mode[0], B5 = 0, i.e. 0x00 or 0xFF over the block);
//   the next four (or three) planes : the planes delivered by the pattern
//              decoder of the pixel's half, start plane first;
//   below those : truncated planes, filled with 0.
// Zero fill is this design's choice: the encoder has already rounded the
// coded bits to the nearest value, so no offset is added back.
// Purely combinational.
module pbcc_bitplane_dec
  import pbcc_pkg::*;
(
  input  logic [1:0] mode,
  input  logic [1:0] sp,
  input  nib_t [3:0] planes_l,
  input  logic       four_l,
  input  nib_t [3:0] planes_r,
  input  logic       four_r,
  output blk_t       pix_out
);

  always_comb begin
    for (int i = 0; i < NPIX; i++) begin
      for (int k = 0; k < 8; k++) begin
        automatic int   j    = 7 - int'(sp) - k;     // plane number below SP
        automatic logic half = (i >= 4);
        automatic int   np   = (half ? four_r : four_l) ? 4 : 3;
        automatic logic [1:0] pos = 2'(3 - (i % 4));          // bit of the nibble
        if (j < 0)
          pix_out[i][k] = mode_plane_bit(mode, k);
        else if (j < np)
          pix_out[i][k] = half ? planes_r[3-j][pos] : planes_l[3-j][pos];
        else
          pix_out[i][k] = 1'b0;
      end
    end
  end

endmodule
