// tb_pbcc_bitplane_dec: checks pixel reconstruction for every mode, start
// plane and plane count: pixel = mode prefix above the start plane, then the
// half's decoded planes, then zeros, computed arithmetically.
module tb_pbcc_bitplane_dec;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] mode, sp;
  nib_t [3:0] pl, pr;
  logic       fl, fr;
  blk_t       pix;

  pbcc_bitplane_dec dut (.mode(mode), .sp(sp), .planes_l(pl), .four_l(fl),
                         .planes_r(pr), .four_r(fr), .pix_out(pix));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      mode = 2'($urandom); sp = 2'($urandom);
      pl = 16'($urandom); pr = 16'($urandom);
      fl = 1'($urandom); fr = 1'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        int np, code, v;
        nib_t [3:0] p;
        p  = (i < 4) ? pl : pr;
        np = ((i < 4) ? fl : fr) ? 4 : 3;
        code = 0;
        for (int j = 0; j < np; j++) code = code * 2 + int'(p[3-j][3 - i % 4]);
        v = ((int'(mode) * 2) >> (3 - int'(sp))) << (8 - int'(sp));
        v += code << (8 - int'(sp) - np);
        checks++;
        if (int'(pix[i]) != v) begin
          failures++;
          $display("FAIL mode=%0d sp=%0d i=%0d pix=%h exp %h", mode, sp, i, pix[i], v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
