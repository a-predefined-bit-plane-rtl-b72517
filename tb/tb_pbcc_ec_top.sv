// tb_pbcc_ec_top: end-to-end test of the embedded compression codec with a
// behavioural 32-bit frame memory.
//
// Phase 1: a small frame A (8 x 6 blocks) is written, then a second frame B
// is written while frame A is read back in random block order through a
// memory that answers 1 to 4 cycles late (in order), so writes and reads
// overlap. Phase 2: a full 1920x1088 frame (480 x 544 blocks) is written
// back to back, one block per cycle, and read back back to back.
// Every memory write is checked (address = base + y * line_blocks + x, data
// = reference encoder) and every block read back is compared with the
// reference decoder applied to that segment. The test counts how often each
// mechanism of the codec occurs (truncation types 1-5, modes 1-4, start
// planes 0-3, pattern cases A/B/C/none, rounding up and its saturation,
// overlapping write and read, delayed memory answers) and fails on any that
// never does. The top keeps all its default parameters.
module tb_pbcc_ec_top;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  localparam int MEM_WORDS = 1 << 19;
  localparam int HD_LB     = 1920 / 4;    // blocks per block row
  localparam int HD_ROWS   = 1088 / 2;    // block rows

  int checks = 0, failures = 0;
  int n_type [1:5], n_mode [4], n_sp [4], n_pat [4];
  int n_round_up = 0, n_round_sat = 0, n_overlap = 0, n_late = 0;

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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- frame memory model ----------------
  logic [31:0] mem [MEM_WORDS];
  logic [31:0] exp_wr_addr [$], exp_wr_data [$];
  int          max_delay = 0;
  logic [31:0] pend_addr [$];
  longint      pend_due [$];
  longint      last_due = 0;
  blk8_t       exp_rd [$];

  always @(posedge clk) begin
    if (rst_n && mem_wr_en) begin
      checks++;
      if (exp_wr_addr.size() == 0) begin
        failures++;
        $display("FAIL unexpected write");
      end else begin
        logic [31:0] ea, ed;
        ea = exp_wr_addr.pop_front();
        ed = exp_wr_data.pop_front();
        if (mem_wr_addr != ea || mem_wr_data != ed) begin
          failures++;
          $display("FAIL write %h:%h exp %h:%h", mem_wr_addr, mem_wr_data, ea, ed);
        end
      end
      n_mode[mem_wr_data[31:30]]++;
      n_sp[mem_wr_data[29:28]]++;
      n_pat[mem_wr_data[27:26]]++;
      n_pat[mem_wr_data[25:24]]++;
      mem[mem_wr_addr[18:0]] = mem_wr_data;
    end
    if (rst_n && mem_wr_en && mem_rd_en) n_overlap++;
    if (rst_n && mem_rd_en) begin
      longint due;
      int d;
      d   = (max_delay == 0) ? 0 : $urandom_range(max_delay);
      due = cycle + 1 + longint'(d);
      if (due < last_due) due = last_due;
      if (d > 0) n_late++;
      last_due = due;
      pend_addr.push_back(mem_rd_addr);
      pend_due.push_back(due);
    end
    // answer the oldest request once it is due (one per cycle, in order)
    if (pend_due.size() != 0 && pend_due[0] <= cycle + 1) begin
      logic [31:0] a;
      a = pend_addr.pop_front();
      void'(pend_due.pop_front());
      mem_rd_valid <= 1'b1;
      mem_rd_data  <= mem[a[18:0]];
    end else begin
      mem_rd_valid <= 1'b0;
    end
  end

  // ---------------- read-back checker ----------------
  always @(posedge clk) begin
    if (rst_n && rd_valid) begin
      checks++;
      if (exp_rd.size() == 0) begin
        failures++;
        $display("FAIL unexpected read block");
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

  // ---------------- stimulus ----------------
  // Frame content: the kind of each block follows a hash of its position, so
  // smooth, flat, textured and pattern-like blocks are all present.
  function automatic blk8_t frame_block(int x, int y);
    return gen_block((x * 7 + y * 13 + (x / 5)) % 4);
  endfunction

  blk8_t img [2][int];   // written blocks of frames A/B (phase 1)
  logic [31:0] seg_of [int unsigned];

  task automatic note_block(blk8_t b, logic [31:0] seg);
    blk8_t t;
    int typ, m, s;
    typ = ref_trunc(b, t);
    n_type[typ]++;
    ref_select(t, m, s);
    foreach (t[i]) begin
      int sh;
      sh = 8 - s - 4;
      if (((int'(t[i]) >> (sh - 1)) & 1) == 1) begin
        if (((int'(t[i]) >> sh) & 15) == 15) n_round_sat++; else n_round_up++;
      end
    end
  endtask

  task automatic write_block(logic [31:0] base, int lb, int x, int y, blk8_t b);
    logic [31:0] seg, a;
    seg = ref_compress(b);
    a   = base + 32'(y * lb + x);
    note_block(b, seg);
    seg_of[a] = seg;
    exp_wr_addr.push_back(a);
    wr_base_addr = base;
    exp_wr_data.push_back(seg);
    wr_valid = 1;
    wr_blk_x = 16'(x);
    wr_blk_y = 16'(y);
    wr_pix   = b;
  endtask

  task automatic read_block(logic [31:0] base, int lb, int x, int y);
    logic [31:0] a;
    a = base + 32'(y * lb + x);
    exp_rd.push_back(ref_decompress(seg_of[a]));
    rd_base_addr = base;
    rd_req   = 1;
    rd_blk_x = 16'(x);
    rd_blk_y = 16'(y);
  endtask

  task automatic drain();
    @(negedge clk);
    wr_valid = 0;
    rd_req   = 0;
    while (exp_wr_addr.size() != 0 || exp_rd.size() != 0 || pend_due.size() != 0)
      @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  localparam logic [31:0] BASE_A  = 32'h0000_1000;
  localparam logic [31:0] BASE_B  = 32'h0000_2000;
  localparam logic [31:0] BASE_HD = 32'h0001_0000;

  initial begin
    int order [$];
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    line_blocks = 16'd8;

    // Phase 1a: write frame A
    for (int y = 0; y < 6; y++)
      for (int x = 0; x < 8; x++) begin
        @(negedge clk);
        write_block(BASE_A, 8, x, y, frame_block(x, y));
      end
    drain();

    // Phase 1b: write frame B while reading frame A in random order
    max_delay = 3;
    for (int i = 0; i < 48; i++) order.push_back(i);
    order.shuffle();
    for (int i = 0; i < 48; i++) begin
      @(negedge clk);
      wr_valid = 0;
      rd_req   = 0;
      if ($urandom_range(3) != 0) write_block(BASE_B, 8, i % 8, i / 8, frame_block(i, 99));
      else i--;  // idle write cycle, retried
      if (order.size() != 0 && $urandom_range(1) == 1) begin
        int k;
        k = order.pop_front();
        read_block(BASE_A, 8, k % 8, k / 8);
      end
    end
    while (order.size() != 0) begin
      int k;
      @(negedge clk);
      wr_valid = 0;
      k = order.pop_front();
      read_block(BASE_A, 8, k % 8, k / 8);
    end
    drain();
    $display("phase 1 done: checks=%0d failures=%0d", checks, failures);

    // Phase 2: one full 1920x1088 frame, written and read back at full rate
    max_delay   = 0;
    line_blocks = 16'(HD_LB);
    t0 = cycle;
    for (int y = 0; y < HD_ROWS; y++)
      for (int x = 0; x < HD_LB; x++) begin
        @(negedge clk);
        write_block(BASE_HD, HD_LB, x, y, frame_block(x, y));
      end
    @(negedge clk);
    wr_valid = 0;
    checks++;
    if (cycle - t0 != HD_LB * HD_ROWS + 1) begin
      failures++;
      $display("FAIL frame write took %0d cycles", cycle - t0);
    end
    drain();
    for (int y = 0; y < HD_ROWS; y++)
      for (int x = 0; x < HD_LB; x++) begin
        @(negedge clk);
        read_block(BASE_HD, HD_LB, x, y);
      end
    drain();

    // mechanism coverage
    for (int t = 1; t <= 5; t++) begin
      checks++;
      if (n_type[t] == 0) begin failures++; $display("FAIL truncation type %0d never", t); end
    end
    for (int i = 0; i < 4; i++) begin
      checks += 3;
      if (n_mode[i] == 0) begin failures++; $display("FAIL mode %0d never", i + 1); end
      if (n_sp[i] == 0)   begin failures++; $display("FAIL start plane %0d never", i); end
      if (n_pat[i] == 0)  begin failures++; $display("FAIL pattern case %0d never", i); end
    end
    checks += 4;
    if (n_round_up == 0)  begin failures++; $display("FAIL rounding never applied"); end
    if (n_round_sat == 0) begin failures++; $display("FAIL rounding saturation never"); end
    if (n_overlap == 0)   begin failures++; $display("FAIL write and read never overlapped"); end
    if (n_late == 0)      begin failures++; $display("FAIL memory never answered late"); end
    $display("types %0d %0d %0d %0d %0d", n_type[1], n_type[2], n_type[3], n_type[4], n_type[5]);
    $display("modes %0d %0d %0d %0d, start planes %0d %0d %0d %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_sp[0], n_sp[1], n_sp[2], n_sp[3]);
    $display("cases A %0d B %0d C %0d none %0d; round-up %0d saturated %0d; overlap %0d late %0d",
             n_pat[0], n_pat[1], n_pat[2], n_pat[3], n_round_up, n_round_sat, n_overlap, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
