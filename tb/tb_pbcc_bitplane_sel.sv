// tb_pbcc_bitplane_sel: checks mode and start plane against the reference,
// which finds for each mode the longest pixel prefix equal to the mode's
// prefix. Uses truncated and raw random blocks and checks that every mode
// and every start plane occurs.
module tb_pbcc_bitplane_sel;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  int checks = 0, failures = 0;
  int seen_mode [4], seen_sp [4];

  blk_t       pix_in;
  logic [1:0] mode, sp;

  pbcc_bitplane_sel dut (.pix_in(pix_in), .mode(mode), .sp(sp));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(blk8_t b);
    int em, es;
    ref_select(b, em, es);
    pix_in = b;
    #1;
    checks++;
    seen_mode[em]++;
    seen_sp[es]++;
    if (int'(mode) != em || int'(sp) != es) begin
      failures++;
      $display("FAIL in=%h mode=%0d exp %0d sp=%0d exp %0d", b, mode, em, sp, es);
    end
  endtask

  initial begin
    blk8_t b, t;
    // Published partition example, pixels 7..0 = 0A 20 2A 25 2A 05 32 04:
    // B7 = B6 = 0x00 and B5 not 0x00, so mode 1 with the start plane at B5
    b = '{8'h0A, 8'h20, 8'h2A, 8'h25, 8'h2A, 8'h05, 8'h32, 8'h04};
    check(b);
    checks++;
    if (mode != 2'd0 || sp != 2'd2) begin
      failures++;
      $display("FAIL partition example: mode=%0d sp=%0d", mode, sp);
    end
    // all pixels 0x80..0x9F -> mode 3, SP 3
    b = '{8'h80, 8'h9F, 8'h85, 8'h90, 8'h81, 8'h82, 8'h83, 8'h84};
    check(b);
    for (int n = 0; n < 20000; n++) begin
      b = gen_block(n % 4);
      if (n % 2 == 0) void'(ref_trunc(b, t)); else t = b;
      check(t);
    end
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (seen_mode[i] == 0) begin failures++; $display("FAIL mode %0d never", i + 1); end
      if (seen_sp[i] == 0)   begin failures++; $display("FAIL sp %0d never", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
