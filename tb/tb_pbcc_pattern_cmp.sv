// tb_pbcc_pattern_cmp: feeds one 2x2 half (already rounded pixels) at every
// start plane and compares case and coded data with the reference group
// search. Group-built halves make groups A, B and C hit; random halves give
// the no comparison case. Every case must occur.
module tb_pbcc_pattern_cmp;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  int checks = 0, failures = 0;
  int seen [4];

  logic [1:0]  sp;
  half_t       p4, p3;
  pat_e        pat;
  logic [11:0] data;

  pbcc_pattern_cmp dut (.sp(sp), .pix_rnd4(p4), .pix_rnd3(p3), .pat(pat), .data(data));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(blk8_t a, blk8_t b, int h, int s_p);
    int c4[4], c3[4], ep;
    logic [11:0] ed;
    for (int i = 0; i < 4; i++) begin
      p4[i] = a[4*h+i];
      p3[i] = b[4*h+i];
      c4[i] = (int'(a[4*h+i]) >> (4 - s_p)) & 15;
      c3[i] = (int'(b[4*h+i]) >> (5 - s_p)) & 7;
    end
    sp = 2'(s_p);
    ep = ref_half_codes(c4, c3, ed);
    #1;
    checks++;
    seen[ep]++;
    if (int'(pat) != ep || data != ed) begin
      failures++;
      $display("FAIL sp=%0d pat=%0d exp %0d data=%h exp %h", s_p, pat, ep, data, ed);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      blk8_t a, b;
      int s_p, m;
      a = gen_block(n % 3 == 0 ? 0 : 2);
      b = gen_block(0);
      ref_select(a, m, s_p);
      if (n % 3 == 0) s_p = $urandom_range(3);
      check(a, b, n % 2, s_p);
    end
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (seen[g] == 0) begin failures++; $display("FAIL case %0d never", g); end
    end
    $display("cases: A %0d B %0d C %0d NC %0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
