// tb_pbcc_rounding: checks both roundings of every pixel against
// min((low + 2^(s-1)) >> s, 2^n - 1), with the published example pixel
// 0101_1100 and random pixels at every start plane. Also checks that bits
// outside the coded field are unchanged and that the saturating case
// (significant bit 1, coded bits all 1) occurs.
module tb_pbcc_rounding;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_up = 0, n_sat = 0;

  blk_t       pix_in, rnd4, rnd3;
  logic [1:0] sp;

  pbcc_rounding dut (.pix_in(pix_in), .sp(sp), .pix_rnd4(rnd4), .pix_rnd3(rnd3));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pix8_t expect_pix(pix8_t p, int s_p, int n);
    int sh, r, v;
    sh = 8 - s_p - n;
    r  = ref_round(int'(p), s_p, n);
    v  = int'(p) & ~(((1 << n) - 1) << sh);
    return pix8_t'(v | (r << sh));
  endfunction

  task automatic check(blk8_t b, int s_p);
    pix_in = b;
    sp     = 2'(s_p);
    #1;
    for (int i = 0; i < 8; i++) begin
      int sh;
      checks += 2;
      if (rnd4[i] != expect_pix(b[i], s_p, 4) || rnd3[i] != expect_pix(b[i], s_p, 3)) begin
        failures++;
        $display("FAIL p=%b sp=%0d rnd4=%b exp %b rnd3=%b exp %b", b[i], s_p,
                 rnd4[i], expect_pix(b[i], s_p, 4), rnd3[i], expect_pix(b[i], s_p, 3));
      end
      sh = 8 - s_p - 4;
      if (((int'(b[i]) >> (sh - 1)) & 1) == 1) begin
        if (((int'(b[i]) >> sh) & 15) == 15) n_sat++; else n_up++;
      end
    end
  endtask

  initial begin
    blk8_t b;
    // published example: 0101_1100, start plane at the MSB
    b = '{default: 8'b0101_1100};
    check(b, 0);
    checks++;
    if (rnd4[0] != 8'b0110_1100 || rnd3[0] != 8'b0111_1100) begin
      failures++;
      $display("FAIL example: %b %b", rnd4[0], rnd3[0]);
    end
    // saturation: coded bits all one stay as they are
    b = '{default: 8'b0001_1111};
    check(b, 3);
    for (int n = 0; n < 20000; n++) check(gen_block(n % 4), int'($urandom_range(3)));
    checks += 2;
    if (n_up == 0)  begin failures++; $display("FAIL no round-up seen"); end
    if (n_sat == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
