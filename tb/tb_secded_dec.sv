// tb_secded_dec: encodes random blocks, flips no bit, one bit or two bits of
// the 523-bit codeword, and checks that the decoder returns the original
// data with corrected=1 after a single flip, and flags uncorrectable after a
// double flip.
module tb_secded_dec;
  logic [511:0] data, dout;
  logic [522:0] cw, bad;
  logic corr, unc;
  int checks = 0, failures = 0;

  secded_enc u_enc (.data(data), .cw(cw));
  secded_dec dut (.cw(bad), .data(dout), .corrected(corr), .uncorrectable(unc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1500; t++) begin
      int nflip, a, b;
      for (int k = 0; k < 16; k++) data[k*32 +: 32] = $urandom;
      nflip = t % 3;
      a = $urandom_range(522);
      do b = $urandom_range(522); while (b == a);
      #1;
      bad = cw;
      if (nflip >= 1) bad[a] = ~bad[a];
      if (nflip == 2) bad[b] = ~bad[b];
      #1;
      checks++;
      case (nflip)
        0: if (dout !== data || corr || unc) begin failures++; $display("FAIL clean"); end
        1: if (dout !== data || !corr || unc) begin failures++; $display("FAIL single bit %0d", a); end
        default: if (!unc || corr) begin failures++; $display("FAIL double %0d %0d", a, b); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
