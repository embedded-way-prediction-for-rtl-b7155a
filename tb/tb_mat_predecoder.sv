// tb_mat_predecoder: exhaustive check of the mat predecoder. For every
// 9-bit index with enable high, pd_lo must be the one-hot code of idx[3:0],
// pd_hi of idx[7:4] and sa_sel the one-hot code of idx[8]; with enable low
// pd_lo must be all zero (the gated 2-4 decoder).
module tb_mat_predecoder;
  logic        en;
  logic [8:0]  idx;
  logic [15:0] pd_lo, pd_hi;
  logic [1:0]  sa_sel;
  int checks = 0, failures = 0;

  mat_predecoder dut (.en(en), .idx(idx), .pd_lo(pd_lo), .pd_hi(pd_hi), .sa_sel(sa_sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 512; i++) begin
        en = e[0]; idx = i[8:0];
        #1;
        checks++;
        if (pd_lo !== (e ? (16'h1 << i[3:0]) : 16'h0) ||
            pd_hi !== (16'h1 << i[7:4]) ||
            sa_sel !== (i[8] ? 2'b10 : 2'b01)) begin
          failures++;
          $display("FAIL en=%0d idx=%0d lo=%h hi=%h sel=%b", e, i, pd_lo, pd_hi, sa_sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
