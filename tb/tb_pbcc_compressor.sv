// tb_pbcc_compressor: streams macroblocks of 32 4x2 blocks back to back, and
// single blocks with gaps, through the compressor. Every segment is compared
// with the reference encoder; the latency must be exactly 2 cycles and a
// 32-block macroblock must finish 33 cycles after its first block is taken.
// Counts each truncation type, mode, start plane and pattern case, and fails
// if one never occurs.
module tb_pbcc_compressor;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  localparam int MB_BLKS = 32;

  int checks = 0, failures = 0;
  int seen_type [1:5], seen_mode [4], seen_sp [4], seen_pat [4];

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  blk_t in_pix = '0;
  logic out_valid;
  seg_t out_seg;

  pbcc_compressor dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pix(in_pix),
                       .out_valid(out_valid), .out_seg(out_seg));

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

  logic [31:0] exp_q [$];
  longint      t_q [$];
  longint      last_out;

  // Output monitor: order, value and latency.
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected segment %h", out_seg);
      end else begin
        logic [31:0] e;
        longint t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        last_out = cycle;
        if (out_seg != e || cycle - t != 1) begin
          failures++;
          $display("FAIL seg=%h exp %h cycles=%0d", out_seg, e, cycle - t + 1);
        end
      end
    end
  end

  task automatic push(blk8_t b);
    blk8_t t;
    logic [31:0] e;
    seen_type[ref_trunc(b, t)]++;
    e = ref_compress(b);
    seen_mode[e[31:30]]++;
    seen_sp[e[29:28]]++;
    seen_pat[e[27:26]]++;
    seen_pat[e[25:24]]++;
    @(negedge clk);
    in_valid = 1;
    in_pix   = b;
    exp_q.push_back(e);
    t_q.push_back(cycle + 1);   // value of cycle after the sampling edge
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk);
    #1;
    // back-to-back macroblocks
    for (int mb = 0; mb < 200; mb++) begin
      longint first;
      first = cycle + 1;   // taken at the next negedge-driven block
      for (int k = 0; k < MB_BLKS; k++) push(gen_block((mb + k) % 4));
      @(negedge clk) in_valid = 0;
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (last_out - first + 1 != 33) begin
        failures++;
        $display("FAIL macroblock took %0d cycles", last_out - first + 1);
      end
    end
    // single blocks with random gaps
    for (int n = 0; n < 2000; n++) begin
      push(gen_block(n % 4));
      @(negedge clk) in_valid = 0;
      repeat ($urandom_range(2)) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d segments missing", exp_q.size()); end
    for (int i = 0; i < 4; i++) begin
      checks += 3;
      if (seen_mode[i] == 0) begin failures++; $display("FAIL mode %0d never", i + 1); end
      if (seen_sp[i] == 0)   begin failures++; $display("FAIL sp %0d never", i); end
      if (seen_pat[i] == 0)  begin failures++; $display("FAIL case %0d never", i); end
    end
    for (int t = 1; t <= 5; t++) begin
      checks++;
      if (seen_type[t] == 0) begin failures++; $display("FAIL type %0d never", t); end
    end
    $display("cases A %0d B %0d C %0d NC %0d", seen_pat[0], seen_pat[1], seen_pat[2], seen_pat[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
