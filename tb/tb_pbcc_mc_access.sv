// tb_pbcc_mc_access: motion-compensation read workload on CIF (352x288) and
// HD720 (1280x720) frames.
//
// Each frame is compressed into the memory model through the codec top.
// Then, for each of the nine motion-vector cases (x and y each Align, Not
// Align or Sub), a 4x4 block's reference region is fetched: 4 pixels wide
// or high when the component is integer, 9 when it is fractional. The test
// reads every 4x2 block the region touches, back to back, and checks:
//  - the number of segment reads equals the expected count for the case
//    (Align/Align 2, Align/NotAlign 2 or 3, Align/Sub 5, NotAlign/Align 4,
//    NotAlign/NotAlign 4 or 6, NotAlign/Sub 10, Sub/Align 6, Sub/NotAlign 6
//    or 9, Sub/Sub 15);
//  - the blocks arrive at one per cycle (last block one memory cycle plus
//    one decode cycle after the last request);
//  - every block equals the reference decoder's output.
// A Sub region starts on the 4x2 grid, as in the published access counts.
module tb_pbcc_mc_access;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  localparam int MEM_WORDS = 1 << 18;

  int checks = 0, failures = 0;
  int n_case [9];

  logic        clk = 0, rst_n = 0;
  logic [31:0] wr_base_addr = '0, rd_base_addr = '0;
  logic [15:0] line_blocks = '0;
  logic        wr_valid = 0;
  logic [15:0] wr_blk_x = '0, wr_blk_y = '0;
  blk_t        wr_pix = '0;
  logic        mem_wr_en;
  logic [31:0] mem_wr_addr, mem_wr_data;
  logic        rd_req = 0;
  logic [15:0] rd_blk_x = '0, rd_blk_y = '0;
  logic        mem_rd_en;
  logic [31:0] mem_rd_addr;
  logic        mem_rd_valid = 0;
  logic [31:0] mem_rd_data = '0;
  logic        rd_valid;
  blk_t        rd_pix;

  pbcc_ec_top dut (.*);

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory: writes land at the edge, reads answer in the next cycle
  logic [31:0] mem [MEM_WORDS];
  logic [31:0] seg_of [int unsigned];
  int          n_writes = 0;
  blk8_t       exp_rd [$];
  longint      last_rd_cycle;

  always @(posedge clk) begin
    if (rst_n && mem_wr_en) begin
      mem[mem_wr_addr[17:0]] = mem_wr_data;
      n_writes++;
    end
    mem_rd_valid <= rst_n && mem_rd_en;
    mem_rd_data  <= mem[mem_rd_addr[17:0]];
  end

  // sampled at the falling edge, where the registered outputs are stable
  always @(negedge clk) begin
    if (rst_n && rd_valid) begin
      last_rd_cycle = cycle;
      checks++;
      if (exp_rd.size() == 0) begin
        failures++;
        $display("FAIL unexpected block");
      end else begin
        blk8_t e;
        e = exp_rd.pop_front();
        if (rd_pix != e) begin
          failures++;
          $display("FAIL read %h exp %h", rd_pix, e);
        end
      end
    end
  end

  task automatic write_frame(int lb, int rows);
    line_blocks = 16'(lb);
    n_writes = 0;
    for (int y = 0; y < rows; y++)
      for (int x = 0; x < lb; x++) begin
        blk8_t b;
        b = gen_block((x * 3 + y * 5) % 4);
        @(negedge clk);
        wr_valid = 1;
        wr_blk_x = 16'(x);
        wr_blk_y = 16'(y);
        wr_pix   = b;
        seg_of[32'(y * lb + x)] = ref_compress(b);
      end
    @(negedge clk);
    wr_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_writes != lb * rows) begin
      failures++;
      $display("FAIL %0d writes for %0d blocks", n_writes, lb * rows);
    end
  endtask

  // Fetch the region of a 4x4 block at pixel (px, py) with the given
  // component classes (0 Align, 1 Not Align, 2 Sub); returns reads issued.
  task automatic fetch(int lb, int px, int py, int cx, int cy, output int reads);
    int w, h, bx0, bx1, by0, by1;
    longint t0;
    w = (cx == 2) ? 9 : 4;
    h = (cy == 2) ? 9 : 4;
    bx0 = px / 4; bx1 = (px + w - 1) / 4;
    by0 = py / 2; by1 = (py + h - 1) / 2;
    reads = 0;
    t0 = -1;
    for (int by = by0; by <= by1; by++)
      for (int bx = bx0; bx <= bx1; bx++) begin
        @(negedge clk);
        if (t0 < 0) t0 = cycle + 1;
        rd_req   = 1;
        rd_blk_x = 16'(bx);
        rd_blk_y = 16'(by);
        exp_rd.push_back(ref_decompress(seg_of[32'(by * lb + bx)]));
        reads++;
      end
    @(negedge clk);
    rd_req = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_rd.size() != 0 || last_rd_cycle - t0 != longint'(reads)) begin
      failures++;
      $display("FAIL fetch: %0d blocks left, %0d reads took %0d cycles",
               exp_rd.size(), reads, last_rd_cycle - t0 + 1);
    end
  endtask

  task automatic run_format(string name, int width, int height);
    int lb, rows;
    lb   = width / 4;
    rows = height / 2;
    write_frame(lb, rows);
    for (int n = 0; n < 300; n++) begin
      int cx, cy, px, py, reads, e_lo, e_hi;
      int ax[3], ay[3];
      cx = n % 3;
      cy = (n / 3) % 3;
      // x: Align = multiple of 4, Not Align = other integer, Sub = on grid
      px = 4 * $urandom_range(lb - 4);
      if (cx == 1) px += $urandom_range(1, 3);
      py = 4 * $urandom_range(rows / 2 - 6);
      if (cy == 1) py += $urandom_range(1, 3);
      fetch(lb, px, py, cx, cy, reads);
      // expected reads: columns x rows of 4x2 blocks
      ax = '{1, 2, 3};
      ay = '{2, 0, 5};
      e_lo = ax[cx] * ((cy == 1) ? 2 : ay[cy]);
      e_hi = ax[cx] * ((cy == 1) ? 3 : ay[cy]);
      checks++;
      n_case[cx * 3 + cy]++;
      if (reads < e_lo || reads > e_hi || (cy == 1 && reads != ax[cx] * ((py % 2 == 0) ? 2 : 3))) begin
        failures++;
        $display("FAIL case (%0d,%0d) at (%0d,%0d): %0d reads", cx, cy, px, py, reads);
      end
    end
    $display("%s: %0d x %0d frame, %0d blocks written, fetches checked", name, width,
             height, lb * rows);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_format("CIF", 352, 288);
    run_format("HD720", 1280, 720);
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (n_case[i] == 0) begin failures++; $display("FAIL MV case %0d never", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
