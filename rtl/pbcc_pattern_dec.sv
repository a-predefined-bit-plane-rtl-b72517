// pbcc_pattern_dec: pattern decoding for one 2x2 half of a segment.
//
// For a half coded with group A, B or C the coded data hold four 3-bit
// pattern indices, start plane first (bits 11:9); each index is looked up in
// the group's eight patterns, giving four bit planes. For a half stored
// without comparison the coded data already are three planes, start plane
// first (bits 11:8), and the fourth output plane is zero. four_planes tells
// the bit-plane decoder how many planes are valid.
// Purely combinational. The inverse of pbcc_pattern_cmp.
module pbcc_pattern_dec
  import pbcc_pkg::*;
(
  input  pat_e              pat,
  input  logic [DATA_W-1:0] data,
  output nib_t [3:0]        planes,       // planes[3] = start plane
  output logic              four_planes
);

  always_comb begin
    if (pat == PAT_NC) begin
      four_planes = 1'b0;
      planes[3]   = data[11:8];
      planes[2]   = data[7:4];
      planes[1]   = data[3:0];
      planes[0]   = 4'b0000;
    end else begin
      four_planes = 1'b1;
      planes[3]   = pattern(pat, data[11:9]);
      planes[2]   = pattern(pat, data[8:6]);
      planes[1]   = pattern(pat, data[5:3]);
      planes[0]   = pattern(pat, data[2:0]);
    end
  end

endmodule
