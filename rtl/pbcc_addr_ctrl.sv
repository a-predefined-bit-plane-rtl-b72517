// pbcc_addr_ctrl: frame-memory address controller of the embedded codec.
//
// Because every 4x2 block compresses to exactly one 32-bit word, a block's
// segment has a fixed place in the frame memory: word
//   base_addr + blk_y * line_blocks + blk_x
// where blk_x counts 4-pixel columns, blk_y counts 2-row block rows and
// line_blocks is the number of blocks in a block row (frame width / 4).
// The published design only states that this controller is simple because
// the ratio is fixed; the raster layout and the interface are this design's.
//
// LATENCY register stages delay req -> addr_valid/addr so that the address
// lines up with a pipelined data path (2 for the compressor's write path,
// 0 for the read path, where the address is combinational). With LATENCY 0
// clk and rst_n are unused; lint reports them and that is expected.
module pbcc_addr_ctrl #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned LATENCY = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [15:0]       line_blocks,
  input  logic              req,
  input  logic [15:0]       blk_x,
  input  logic [15:0]       blk_y,
  output logic              addr_valid,
  output logic [ADDR_W-1:0] addr
);

  logic [ADDR_W-1:0] addr_c;

  always_comb
    addr_c = base_addr + ADDR_W'(blk_y * {16'd0, line_blocks}) + ADDR_W'(blk_x);

  if (LATENCY == 0) begin : g_comb
    assign addr_valid = req;
    assign addr       = addr_c;
  end else begin : g_pipe
    logic              v_q [LATENCY];
    logic [ADDR_W-1:0] a_q [LATENCY];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int s = 0; s < LATENCY; s++) begin
          v_q[s] <= 1'b0;
          a_q[s] <= '0;
        end
      end else begin
        v_q[0] <= req;
        a_q[0] <= addr_c;
        for (int s = 1; s < LATENCY; s++) begin
          v_q[s] <= v_q[s-1];
          a_q[s] <= a_q[s-1];
        end
      end
    end
    assign addr_valid = v_q[LATENCY-1];
    assign addr       = a_q[LATENCY-1];
  end

endmodule
