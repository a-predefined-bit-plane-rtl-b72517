// pbcc_decompressor: reconstructs a 4x2 block from a 32-bit segment.
//
// One pipeline stage: the parser splits the segment into its fields (seg_t),
// two pattern decoders (pbcc_pattern_dec) turn the left and right coded data
// into bit planes, and the bit-plane decoder (pbcc_bitplane_dec) assembles
// the pixels; the result is registered.
//
// Interface: a segment presented on in_valid/in_seg during clock cycle n is
// decoded within that cycle and appears on out_valid/out_pix at the end of
// it, so a block takes 1 cycle and the 32 blocks of a macroblock take 32
// cycles, the published figures. No back-pressure. rst_n is an active-low
// synchronous reset.
module pbcc_decompressor
  import pbcc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  seg_t in_seg,
  output logic out_valid,
  output blk_t out_pix
);

  // Parser: the segment is a packed struct, its fields are the parsed values.
  logic [1:0]        mode, sp;
  pat_e              pat_l, pat_r;
  logic [DATA_W-1:0] data_l, data_r;

  always_comb begin
    mode   = in_seg.mode;
    sp     = in_seg.sp;
    pat_l  = in_seg.pat_l;
    pat_r  = in_seg.pat_r;
    data_l = in_seg.data_l;
    data_r = in_seg.data_r;
  end

  nib_t [3:0] planes_l, planes_r;
  logic       four_l, four_r;
  blk_t       pix;

  pbcc_pattern_dec u_pdec_l (
    .pat        (pat_l),
    .data       (data_l),
    .planes     (planes_l),
    .four_planes(four_l)
  );

  pbcc_pattern_dec u_pdec_r (
    .pat        (pat_r),
    .data       (data_r),
    .planes     (planes_r),
    .four_planes(four_r)
  );

  pbcc_bitplane_dec u_bdec (
    .mode    (mode),
    .sp      (sp),
    .planes_l(planes_l),
    .four_l  (four_l),
    .planes_r(planes_r),
    .four_r  (four_r),
    .pix_out (pix)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pix <= pix;
    end
  end

endmodule
