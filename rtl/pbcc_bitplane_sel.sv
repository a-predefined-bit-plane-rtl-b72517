// pbcc_bitplane_sel: selective bit plane, start of the second compressor stage.
//
// Bit plane Bk collects bit k of all eight pixels (an 8-bit value, 0x00 when
// the bit is clear in every pixel, 0xFF when it is set in every pixel). Each
// of the four modes fixes the value of the three top planes:
//   mode 1: B7 = 0x00, B6 = 0x00, B5 = 0x00
//   mode 2: B7 = 0x00, B6 = 0xFF, B5 = 0x00
//   mode 3: B7 = 0xFF, B6 = 0x00, B5 = 0x00
//   mode 4: B7 = 0xFF, B6 = 0xFF, B5 = 0x00
// For each mode the start plane (SP) is the number of leading planes, from
// B7 down, that hold the mode's fixed value (0..3); the decoder rebuilds
// those planes from the mode alone. The mode with the largest SP wins; on a
// tie the lowest-numbered mode is taken (this design's choice, any of the
// tied modes decodes to the same planes).
//
// Purely combinational. Outputs: mode (mode number - 1) and sp.
module pbcc_bitplane_sel
  import pbcc_pkg::*;
(
  input  blk_t       pix_in,
  output logic [1:0] mode,
  output logic [1:0] sp
);

  logic [7:0] plane [8];      // plane[k] = bit plane Bk
  logic [1:0] sp_m  [4];      // start plane offered by each mode

  always_comb begin
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < NPIX; i++)
        plane[k][i] = pix_in[i][k];
  end

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      if (plane[7] != {8{mode_plane_bit(2'(m), 7)}})      sp_m[m] = 2'd0;
      else if (plane[6] != {8{mode_plane_bit(2'(m), 6)}}) sp_m[m] = 2'd1;
      else if (plane[5] != {8{mode_plane_bit(2'(m), 5)}}) sp_m[m] = 2'd2;
      else                                                sp_m[m] = 2'd3;
    end
  end

  always_comb begin
    mode = 2'd0;
    sp   = sp_m[0];
    for (int m = 1; m < 4; m++) begin
      if (sp_m[m] > sp) begin
        mode = 2'(m);
        sp   = sp_m[m];
      end
    end
  end

endmodule
