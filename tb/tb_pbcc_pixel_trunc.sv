// tb_pbcc_pixel_trunc: checks the pixel truncation against the arithmetic
// reference (average, max-min difference, clamp to the type's range) on
// directed boundary blocks and random blocks, and checks that all five types
// occur.
module tb_pbcc_pixel_trunc;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  int checks = 0, failures = 0;
  int seen [1:5];

  blk_t        pix_in, pix_out;
  trunc_type_e blk_type;

  pbcc_pixel_trunc dut (.pix_in(pix_in), .pix_out(pix_out), .blk_type(blk_type));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(blk8_t b);
    blk8_t exp;
    int t;
    t = ref_trunc(b, exp);
    pix_in = b;
    #1;
    checks++;
    seen[t]++;
    if (int'(blk_type) != t || pix_out != exp) begin
      failures++;
      $display("FAIL in=%h type=%0d exp %0d out=%h exp %h", b, blk_type, t, pix_out, exp);
    end
  endtask

  initial begin
    blk8_t b;
    // type 1 with one pixel above 63: avg 58, diff 31
    b = '{8'd60, 8'd60, 8'd60, 8'd60, 8'd60, 8'd60, 8'd33, 8'd64};
    check(b);
    // type 2 both clamps: avg 96, diff 63
    b = '{8'd96, 8'd96, 8'd96, 8'd96, 8'd96, 8'd96, 8'd65, 8'd128};
    check(b);
    // type 3 both clamps
    b = '{8'd160, 8'd160, 8'd160, 8'd160, 8'd160, 8'd160, 8'd127, 8'd190};
    check(b);
    // type 4 with a pixel below 192
    b = '{8'd220, 8'd220, 8'd220, 8'd220, 8'd220, 8'd220, 8'd191, 8'd222};
    check(b);
    // type 5: diff too large
    b = '{8'd0, 8'd10, 8'd20, 8'd30, 8'd40, 8'd50, 8'd60, 8'd70};
    check(b);
    for (int n = 0; n < 20000; n++) check(gen_block(n % 4));
    for (int t = 1; t <= 5; t++) begin
      checks++;
      if (seen[t] == 0) begin
        failures++;
        $display("FAIL type %0d never occurred", t);
      end
    end
    $display("types seen: %0d %0d %0d %0d %0d", seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
