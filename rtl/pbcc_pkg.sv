// pbcc_pkg: types and constants shared by the bit-plane comparison codec.
//
// A 4x2 block holds eight 8-bit pixels. They are numbered as in the block
// partitioning of the algorithm: the top row is 0 1 4 5 and the bottom row is
// 2 3 6 7. Pixels 0..3 form the left 2x2 half and pixels 4..7 the right half.
// A bit plane of one half is a 4-bit nibble whose bit 3 belongs to the first
// pixel of the half (0 or 4) and bit 0 to the last (3 or 7). Written as a
// string, pattern "1110" therefore sets pixels 0, 1 and 2 of the half.
//
// The 32-bit segment follows the published layout, most significant field
// first: mode (2), start plane (2), pattern L (2), pattern R (2), coded data L
// (12), coded data R (12). Mode 1..4 is stored as 0..3; the pattern field
// names group A, B, C or no comparison as 0..3. Both encodings are this
// design's choice.
//
// The three pattern groups (8 patterns each) are the published table. Pattern
// number n of a group is coded as the 3-bit index n-1.
package pbcc_pkg;

  localparam int unsigned PIX_W   = 8;   // bits per pixel
  localparam int unsigned NPIX    = 8;   // pixels per 4x2 block
  localparam int unsigned SEG_W   = 32;  // compressed segment width (ratio 2)
  localparam int unsigned DATA_W  = 12;  // coded data per 2x2 half

  typedef logic [PIX_W-1:0] pix_t;
  typedef pix_t [NPIX-1:0]   blk_t;      // blk[i] is pixel i
  typedef pix_t [3:0]        half_t;     // half[i] is pixel i of a 2x2 half
  typedef logic [3:0]        nib_t;      // one bit plane of a 2x2 half

  // Pattern comparison case of a 2x2 half.
  typedef enum logic [1:0] {
    PAT_A  = 2'd0,
    PAT_B  = 2'd1,
    PAT_C  = 2'd2,
    PAT_NC = 2'd3   // no comparison: three raw planes are stored
  } pat_e;

  // Truncation type of a block (types 1..5).
  typedef enum logic [2:0] {
    TYPE_1 = 3'd1,  // 0   <= avg < 64,  diff < 32
    TYPE_2 = 3'd2,  // 64  <= avg < 128, diff < 64
    TYPE_3 = 3'd3,  // 128 <= avg < 192, diff < 64
    TYPE_4 = 3'd4,  // 192 <= avg,       diff < 32
    TYPE_5 = 3'd5   // no change
  } trunc_type_e;

  typedef struct packed {
    logic [1:0]        mode;    // mode number - 1
    logic [1:0]        sp;      // start plane = planes skipped from B7
    pat_e              pat_l;
    pat_e              pat_r;
    logic [DATA_W-1:0] data_l;
    logic [DATA_W-1:0] data_r;
  } seg_t;

  // Pattern n+1 of group g (g = PAT_A, PAT_B or PAT_C).
  function automatic nib_t pattern(pat_e g, logic [2:0] idx);
    // Patterns 1..4 are shared by all groups.
    case (idx)
      3'd0: return 4'b0000;
      3'd1: return 4'b1111;
      3'd2: return 4'b1110;
      3'd3: return 4'b0111;
      default: ;
    endcase
    case (g)
      PAT_A: case (idx)
               3'd4: return 4'b0011;
               3'd5: return 4'b1100;
               3'd6: return 4'b0001;
               default: return 4'b1000;
             endcase
      PAT_B: case (idx)
               3'd4: return 4'b1010;
               3'd5: return 4'b1001;
               3'd6: return 4'b0110;
               default: return 4'b0101;
             endcase
      default: case (idx)
               3'd4: return 4'b1101;
               3'd5: return 4'b1011;
               3'd6: return 4'b0010;
               default: return 4'b0100;
             endcase
    endcase
  endfunction

  // Value of the skipped plane B7, B6 or B5 in a mode: mode 1 = 0/0/0,
  // mode 2 = 0/1/0, mode 3 = 1/0/0, mode 4 = 1/1/0 (B7/B6/B5).
  function automatic logic mode_plane_bit(logic [1:0] mode, int unsigned b);
    case (b)
      7:       return mode[1];
      6:       return mode[0];
      default: return 1'b0;
    endcase
  endfunction

endpackage
