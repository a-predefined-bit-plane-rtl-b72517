// tb_pbcc_pattern_dec: checks pattern decoding with every group and random
// indices (planes must be the table entries) and with no comparison data
// (three planes passed through, four_planes low).
module tb_pbcc_pattern_dec;
  import pbcc_pkg::*;
  import pbcc_ref_pkg::*;

  int checks = 0, failures = 0;

  pat_e        pat;
  logic [11:0] data;
  nib_t [3:0]  planes;
  logic        four;

  pbcc_pattern_dec dut (.pat(pat), .data(data), .planes(planes), .four_planes(four));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [3:0] exp [4];
      logic       ef;
      pat  = pat_e'(n % 4);
      data = 12'($urandom);
      if (n % 4 == 3) begin
        ef = 0;
        exp[0] = data[11:8]; exp[1] = data[7:4]; exp[2] = data[3:0]; exp[3] = 4'b0;
      end else begin
        int idx[4];
        ef = 1;
        idx[0] = int'(data) / 512;
        idx[1] = (int'(data) / 64) % 8;
        idx[2] = (int'(data) / 8) % 8;
        idx[3] = int'(data) % 8;
        for (int j = 0; j < 4; j++) exp[j] = GRP[n % 4][idx[j]];
      end
      #1;
      checks++;
      if (four != ef || planes[3] != exp[0] || planes[2] != exp[1] ||
          planes[1] != exp[2] || (ef && planes[0] != exp[3])) begin
        failures++;
        $display("FAIL pat=%0d data=%h planes=%h four=%b", pat, data, planes, four);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
