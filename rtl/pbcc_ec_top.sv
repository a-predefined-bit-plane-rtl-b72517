// pbcc_ec_top: embedded compression codec between a video decoder and its
// 32-bit frame memory.
//
// Write path: each filtered 4x2 block (wr_valid, wr_pix, its block position)
// enters the compressor; at the end of the following cycle its 32-bit
// segment leaves on mem_wr_data together with mem_wr_en and the word address
// computed by the write-side address controller, delayed to match.
// Read path: a block request from motion compensation (rd_req with a block
// position) becomes a memory read (mem_rd_en, mem_rd_addr) in the same
// cycle; when the memory returns the word (mem_rd_valid, mem_rd_data, any
// number of cycles later, in request order) the decompressor rebuilds the
// block within that cycle and registers it on rd_valid/rd_pix.
// Frame layout: one word per block in raster order from the frame's base
// address, with line_blocks blocks per block row. Writes and reads have
// their own base address, since a decoder writes the current frame while
// motion compensation reads a reference frame. The memory interface is plain
// strobe/address/data, a choice of this design; the surrounding decoder, bus
// and arbiter are outside this module.
module pbcc_ec_top
  import pbcc_pkg::*;
#(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] wr_base_addr,  // frame being written
  input  logic [ADDR_W-1:0] rd_base_addr,  // reference frame being read
  input  logic [15:0]       line_blocks,
  // from the deblocking filter
  input  logic              wr_valid,
  input  logic [15:0]       wr_blk_x,
  input  logic [15:0]       wr_blk_y,
  input  blk_t              wr_pix,
  // to the frame memory (write)
  output logic              mem_wr_en,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output logic [SEG_W-1:0]  mem_wr_data,
  // from motion compensation
  input  logic              rd_req,
  input  logic [15:0]       rd_blk_x,
  input  logic [15:0]       rd_blk_y,
  // to / from the frame memory (read)
  output logic              mem_rd_en,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic              mem_rd_valid,
  input  logic [SEG_W-1:0]  mem_rd_data,
  // to motion compensation
  output logic              rd_valid,
  output blk_t              rd_pix
);

  logic seg_valid;
  seg_t seg;
  logic wa_valid;

  pbcc_compressor u_comp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (wr_valid),
    .in_pix   (wr_pix),
    .out_valid(seg_valid),
    .out_seg  (seg)
  );

  pbcc_addr_ctrl #(.ADDR_W(ADDR_W), .LATENCY(2)) u_wr_addr (
    .clk        (clk),
    .rst_n      (rst_n),
    .base_addr  (wr_base_addr),
    .line_blocks(line_blocks),
    .req        (wr_valid),
    .blk_x      (wr_blk_x),
    .blk_y      (wr_blk_y),
    .addr_valid (wa_valid),
    .addr       (mem_wr_addr)
  );

  assign mem_wr_en   = seg_valid;
  assign mem_wr_data = seg;

  // The address pipeline and the compressor pipeline must stay in step.
  a_wr_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                 wa_valid == seg_valid);

  pbcc_addr_ctrl #(.ADDR_W(ADDR_W), .LATENCY(0)) u_rd_addr (
    .clk        (clk),
    .rst_n      (rst_n),
    .base_addr  (rd_base_addr),
    .line_blocks(line_blocks),
    .req        (rd_req),
    .blk_x      (rd_blk_x),
    .blk_y      (rd_blk_y),
    .addr_valid (mem_rd_en),
    .addr       (mem_rd_addr)
  );

  pbcc_decompressor u_decomp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mem_rd_valid),
    .in_seg   (seg_t'(mem_rd_data)),
    .out_valid(rd_valid),
    .out_pix  (rd_pix)
  );

endmodule
