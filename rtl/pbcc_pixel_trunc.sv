// pbcc_pixel_trunc: pixel truncation, the first compressor stage.
//
// The block average (sum of the eight pixels divided by 8, rounded down) and
// the difference between its largest and smallest pixel classify the block:
//   type 1:   0 <= avg <  64 and diff < 32  -> pixels >= 64  become 63
//   type 2:  64 <= avg < 128 and diff < 64  -> pixels <  64  become 64,
//                                              pixels >= 128 become 127
//   type 3: 128 <= avg < 192 and diff < 64  -> pixels < 128  become 128,
//                                              pixels >= 192 become 191
//   type 4: 192 <= avg       and diff < 32  -> pixels < 192  become 192
//   type 5: anything else                   -> pixels unchanged
// After truncation every pixel of a type 1..4 block lies in one quarter of
// the 0..255 range, so its two top bit planes are constant. The thresholds
// and clamp values are the published ones; rounding the average down is this
// design's choice.
//
// Purely combinational: pix_in to pix_out and blk_type in the same cycle.
module pbcc_pixel_trunc
  import pbcc_pkg::*;
(
  input  blk_t        pix_in,
  output blk_t        pix_out,
  output trunc_type_e blk_type
);

  logic [PIX_W+2:0] sum;
  pix_t             avg, pmax, pmin, diff;

  always_comb begin
    sum  = '0;
    pmax = pix_in[0];
    pmin = pix_in[0];
    for (int i = 0; i < NPIX; i++) begin
      sum = sum + (PIX_W+3)'(pix_in[i]);
      if (pix_in[i] > pmax) pmax = pix_in[i];
      if (pix_in[i] < pmin) pmin = pix_in[i];
    end
    avg  = sum[PIX_W+2:3];
    diff = pmax - pmin;
  end

  always_comb begin
    if (avg < 8'd64)       blk_type = (diff < 8'd32) ? TYPE_1 : TYPE_5;
    else if (avg < 8'd128) blk_type = (diff < 8'd64) ? TYPE_2 : TYPE_5;
    else if (avg < 8'd192) blk_type = (diff < 8'd64) ? TYPE_3 : TYPE_5;
    else                   blk_type = (diff < 8'd32) ? TYPE_4 : TYPE_5;
  end

  always_comb begin
    for (int i = 0; i < NPIX; i++) begin
      pix_out[i] = pix_in[i];
      case (blk_type)
        TYPE_1: if (pix_in[i] >= 8'd64) pix_out[i] = 8'd63;
        TYPE_2: if (pix_in[i] < 8'd64) pix_out[i] = 8'd64;
                else if (pix_in[i] >= 8'd128) pix_out[i] = 8'd127;
        TYPE_3: if (pix_in[i] < 8'd128) pix_out[i] = 8'd128;
                else if (pix_in[i] >= 8'd192) pix_out[i] = 8'd191;
        TYPE_4: if (pix_in[i] < 8'd192) pix_out[i] = 8'd192;
        default: ;
      endcase
    end
  end

endmodule
