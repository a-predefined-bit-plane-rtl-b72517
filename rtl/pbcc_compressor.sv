// pbcc_compressor: compresses one 4x2 block of 8-bit pixels (64 bits) into a
// 32-bit segment, a fixed compression ratio of 2.
//
// Two pipeline stages, one cycle each:
//   stage 1: pixel truncation (pbcc_pixel_trunc), registered;
//   stage 2: selective bit plane (pbcc_bitplane_sel), rounding
//            (pbcc_rounding), pattern comparison of the left and right 2x2
//            halves (two pbcc_pattern_cmp) and the packer, registered.
// The packer concatenates mode, start plane, pattern L/R and coded data L/R
// into the segment (seg_t, most significant field first).
//
// Interface: a block presented on in_valid/in_pix during clock cycle n is
// truncated during cycle n (stage 1 register loads at the end of cycle n) and
// coded during cycle n+1; out_valid/out_seg change at the end of cycle n+1.
// A block thus takes 2 cycles, one block is accepted per cycle and the 32
// blocks of a 16x16 macroblock take 33 cycles, the published figures. There
// is no back-pressure; the published design has none. rst_n is an active-low
// synchronous reset that clears the valid bits and the data registers.
module pbcc_compressor
  import pbcc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  blk_t in_pix,
  output logic out_valid,
  output seg_t out_seg
);

  // ---- stage 1: pixel truncation ----
  blk_t        trunc_pix;
  trunc_type_e trunc_type;
  logic        s1_valid;
  blk_t        s1_pix;

  pbcc_pixel_trunc u_trunc (
    .pix_in  (in_pix),
    .pix_out (trunc_pix),
    .blk_type(trunc_type)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_pix   <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) s1_pix <= trunc_pix;
    end
  end

  // ---- stage 2: selective bit plane, rounding, comparison, packer ----
  logic [1:0]        mode, sp;
  blk_t              rnd4, rnd3;
  pat_e              pat_l, pat_r;
  logic [DATA_W-1:0] data_l, data_r;
  seg_t              seg;

  pbcc_bitplane_sel u_sel (
    .pix_in(s1_pix),
    .mode  (mode),
    .sp    (sp)
  );

  pbcc_rounding u_round (
    .pix_in  (s1_pix),
    .sp      (sp),
    .pix_rnd4(rnd4),
    .pix_rnd3(rnd3)
  );

  pbcc_pattern_cmp u_cmp_l (
    .sp      (sp),
    .pix_rnd4(rnd4[3:0]),
    .pix_rnd3(rnd3[3:0]),
    .pat     (pat_l),
    .data    (data_l)
  );

  pbcc_pattern_cmp u_cmp_r (
    .sp      (sp),
    .pix_rnd4(rnd4[7:4]),
    .pix_rnd3(rnd3[7:4]),
    .pat     (pat_r),
    .data    (data_r)
  );

  // Packer.
  always_comb begin
    seg.mode   = mode;
    seg.sp     = sp;
    seg.pat_l  = pat_l;
    seg.pat_r  = pat_r;
    seg.data_l = data_l;
    seg.data_r = data_r;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_seg   <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) out_seg <= seg;
    end
  end

  // The truncation type is only needed inside stage 1.
  logic unused_type;
  assign unused_type = ^trunc_type;

endmodule
