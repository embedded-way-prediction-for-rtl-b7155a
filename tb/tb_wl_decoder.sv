// tb_wl_decoder: drives predecode groups for random rows and random
// matchline patterns and checks that exactly the addressed row is selected,
// and that its wordline follows its matchline and the sub-array select.
module tb_wl_decoder;
  localparam int ROWS = 256;
  logic [15:0] pd_lo, pd_hi;
  logic        sel;
  logic [ROWS-1:0] match, row_sel, wl, exp_rs;
  int checks = 0, failures = 0;

  wl_decoder #(.ROWS(ROWS)) dut (.pd_lo(pd_lo), .pd_hi(pd_hi), .sel(sel), .match(match),
                                 .row_sel(row_sel), .wl(wl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      sel = $urandom_range(1);
      pd_lo = 16'h1 << (r % 16);
      pd_hi = 16'h1 << (r / 16);
      for (int k = 0; k < ROWS / 32; k++) match[k*32 +: 32] = $urandom;
      #1;
      exp_rs = '0;
      exp_rs[r] = sel;
      checks++;
      if (row_sel !== exp_rs || wl !== (exp_rs & match)) begin
        failures++;
        $display("FAIL row=%0d sel=%0d", r, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
