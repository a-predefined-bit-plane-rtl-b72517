// pbcc_rounding: rounding of the coded bits of every pixel.
//
// Only the planes from the start plane down are coded: four planes when a
// 2x2 half is coded with a pattern group ("comparison code rounding") and
// three when it is stored raw ("no comparison rounding"). The coded bits of
// a pixel are bits [7-sp -: n] (n = 4 or 3); the significant bit is the
// first truncated bit below them, bit 7-sp-n. When that bit is 1 and the
// coded bits are not all 1, the coded bits are incremented by one, which
// rounds the pixel to the nearest value the code can hold. Bits above the
// start plane and the truncated bits are passed unchanged.
//
// Both roundings are produced side by side, because the pattern comparison
// only decides afterwards which one each half uses (this design's way of
// resolving that order). Purely combinational.
module pbcc_rounding
  import pbcc_pkg::*;
(
  input  blk_t       pix_in,
  input  logic [1:0] sp,
  output blk_t       pix_rnd4,   // comparison code rounding (4 coded bits)
  output blk_t       pix_rnd3    // no comparison rounding (3 coded bits)
);

  // Round one pixel with n coded bits starting at bit 7-sp.
  function automatic pix_t round_pix(pix_t p, logic [1:0] s, int unsigned n);
    pix_t        q;
    logic [3:0]  coded;
    logic [3:0]  ones;
    logic        sig;
    int unsigned top;
    q     = p;
    top   = 7 - int'(s);
    coded = '0;
    for (int unsigned j = 0; j < n; j++)
      coded[j] = p[top-n+1+j];
    sig   = p[top-n];
    ones  = 4'((1 << n) - 1);
    if (sig && coded != ones) begin
      coded = coded + 4'd1;
      for (int unsigned j = 0; j < n; j++)
        q[top-n+1+j] = coded[j];
    end
    return q;
  endfunction

  always_comb begin
    for (int i = 0; i < NPIX; i++) begin
      pix_rnd4[i] = round_pix(pix_in[i], sp, 4);
      pix_rnd3[i] = round_pix(pix_in[i], sp, 3);
    end
  end

endmodule
