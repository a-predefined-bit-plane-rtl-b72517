// tb_pbcc_addr_ctrl: checks the block-to-word address mapping
// base + y * line_blocks + x, combinational (default latency) and through a
// two-stage pipeline, including the valid timing.
module tb_pbcc_addr_ctrl;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] base;
  logic [15:0] lb, x, y;
  logic        req;
  logic        v0, v2;
  logic [31:0] a0, a2;

  pbcc_addr_ctrl dut0 (.clk(clk), .rst_n(rst_n), .base_addr(base), .line_blocks(lb),
                       .req(req), .blk_x(x), .blk_y(y), .addr_valid(v0), .addr(a0));
  pbcc_addr_ctrl #(.LATENCY(2)) dut2 (.clk(clk), .rst_n(rst_n), .base_addr(base),
                       .line_blocks(lb), .req(req), .blk_x(x), .blk_y(y),
                       .addr_valid(v2), .addr(a2));

  always #5 clk = ~clk;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] hist_a [3];
  logic        hist_v [3];

  initial begin
    req = 0; base = 0; lb = 0; x = 0; y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] e;
      @(negedge clk);
      base = $urandom;
      lb   = 16'($urandom_range(1, 480));
      x    = 16'($urandom_range(0, int'(lb) - 1));
      y    = 16'($urandom_range(0, 1000));
      req  = 1'($urandom);
      e    = base + 32'(y) * 32'(lb) + 32'(x);
      #1;
      checks++;
      if (v0 != req || (req && a0 != e)) begin
        failures++;
        $display("FAIL comb req=%b v=%b addr=%h exp %h", req, v0, a0, e);
      end
      hist_a[2] = hist_a[1]; hist_v[2] = hist_v[1];
      hist_a[1] = hist_a[0]; hist_v[1] = hist_v[0];
      hist_a[0] = e;         hist_v[0] = req;
      @(posedge clk); #1;
      if (n >= 2) begin
        checks++;
        if (v2 != hist_v[1] || (v2 && a2 != hist_a[1])) begin
          failures++;
          $display("FAIL pipe v=%b addr=%h exp %b %h", v2, a2, hist_v[1], hist_a[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
