// pbcc_pattern_cmp: pattern comparison for one 2x2 half of the block.
//
// The four bit planes from the start plane down (taken from the pixels after
// comparison code rounding) are looked up in the eight patterns of group A,
// then B, then C. The first group that holds all four planes is chosen and
// the coded data are the four 3-bit pattern indices, the start plane's index
// in bits 11:9. When no group holds all four, the half is stored without
// comparison: the three planes from the start plane down, taken from the
// pixels after no comparison rounding, as three nibbles, start plane first
// in bits 11:8. A 2x2 plane is a nibble with the half's first pixel in bit 3.
//
// The groups and the fall-back to three raw planes follow the published
// algorithm. Requiring all four planes to hit, the A-B-C priority and the
// bit order of the coded data are this design's choices.
// Purely combinational.
module pbcc_pattern_cmp
  import pbcc_pkg::*;
(
  input  logic [1:0]        sp,
  input  half_t             pix_rnd4,
  input  half_t             pix_rnd3,
  output pat_e              pat,
  output logic [DATA_W-1:0] data
);

  nib_t       pl4 [4];        // planes 7-sp .. 4-sp after 4-bit rounding
  nib_t       pl3 [3];        // planes 7-sp .. 5-sp after 3-bit rounding
  logic [2:0] idx [3][4];     // index of each plane in each group
  logic [3:0] hit [3];        // plane found in group

  always_comb begin
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++)
        pl4[j][3-i] = pix_rnd4[i][7-int'(sp)-j];
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < 4; i++)
        pl3[j][3-i] = pix_rnd3[i][7-int'(sp)-j];
  end

  always_comb begin
    for (int g = 0; g < 3; g++)
      for (int j = 0; j < 4; j++) begin
        idx[g][j] = '0;
        hit[g][j] = 1'b0;
        for (int n = 0; n < 8; n++)
          if (pattern(pat_e'(g), 3'(n)) == pl4[j]) begin
            idx[g][j] = 3'(n);
            hit[g][j] = 1'b1;
          end
      end
  end

  always_comb begin
    if (&hit[0]) begin
      pat  = PAT_A;
      data = {idx[0][0], idx[0][1], idx[0][2], idx[0][3]};
    end else if (&hit[1]) begin
      pat  = PAT_B;
      data = {idx[1][0], idx[1][1], idx[1][2], idx[1][3]};
    end else if (&hit[2]) begin
      pat  = PAT_C;
      data = {idx[2][0], idx[2][1], idx[2][2], idx[2][3]};
    end else begin
      pat  = PAT_NC;
      data = {pl3[0], pl3[1], pl3[2]};
    end
  end

endmodule
