// tb_secded: checks the SECDED encoder against an independent model. The
// model recomputes every Hamming check bit as the parity of the positions
// it covers and the overall parity over the whole word, for random blocks;
// the encoder's codeword must then also pass through the decoder unchanged.
module tb_secded;
  logic [511:0] data, dout;
  logic [522:0] cw;
  logic corr, unc;
  int checks = 0, failures = 0;

  secded_enc dut (.data(data), .cw(cw));
  secded_dec u_dec (.cw(cw), .data(dout), .corrected(corr), .uncorrectable(unc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int d;
      logic ok;
      for (int k = 0; k < 16; k++) data[k*32 +: 32] = (t < 2) ? {32{t[0]}} : $urandom;
      #1;
      ok = 1;
      // data bits in non-power-of-two positions, in order
      d = 0;
      for (int p = 1; p <= 522; p++)
        if ((p & (p - 1)) != 0) begin
          if (cw[p-1] !== data[d]) ok = 0;
          d++;
        end
      // each check bit makes its group even
      for (int k = 0; k < 10; k++) begin
        logic par;
        par = 0;
        for (int p = 1; p <= 522; p++) if ((p >> k) & 1) par ^= cw[p-1];
        if (par !== 1'b0) ok = 0;
      end
      if (^cw !== 1'b0) ok = 0;
      checks++;
      if (!ok || dout !== data || corr || unc) begin
        failures++; $display("FAIL encode t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
