// tb_pbcc_decompressor: sends random segments (every field value) and
// segments of encoded blocks, back to back in groups of 32, and compares the
// blocks with the reference decoder. Latency must be exactly 1 cycle, and 32
// segments must be decoded in 32 cycles.
module tb_pbcc_decompressor;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  localparam int MB_BLKS = 32;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  seg_t in_seg = '0;
  logic out_valid;
  blk_t out_pix;

  pbcc_decompressor dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_seg(in_seg),
                         .out_valid(out_valid), .out_pix(out_pix));

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  blk8_t  exp_q [$];
  longint t_q [$];
  longint last_out;

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected block");
      end else begin
        blk8_t  e;
        longint t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        last_out = cycle;
        if (out_pix != e || cycle - t != 0) begin
          failures++;
          $display("FAIL pix=%h exp %h cycles=%0d", out_pix, e, cycle - t + 1);
        end
      end
    end
  end

  task automatic push(logic [31:0] s);
    @(negedge clk);
    in_valid = 1;
    in_seg   = s;
    exp_q.push_back(ref_decompress(s));
    t_q.push_back(cycle + 1);   // value of cycle after the sampling edge
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk);
    #1;
    for (int mb = 0; mb < 300; mb++) begin
      longint first;
      first = cycle + 1;   // taken at the next negedge-driven block
      for (int k = 0; k < MB_BLKS; k++)
        push((mb % 2 == 0) ? $urandom : ref_compress(gen_block(k % 4)));
      @(negedge clk) in_valid = 0;
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (last_out - first + 1 != 32) begin
        failures++;
        $display("FAIL 32 segments took %0d cycles", last_out - first + 1);
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d blocks missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
