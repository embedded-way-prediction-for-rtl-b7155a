// mat_predecoder: the row predecoder shared by the four sub-arrays of a mat.
//
// The nine set-index bits arrive with an enable. Four 2-to-4 decoders turn
// bit pairs [1:0], [3:2], [5:4] and [7:6] into one-hot groups of four. The
// decoder of bits [1:0] is the one gated by the enable, so a disabled mat
// drives no predecode line. A NAND-style combining stage then turns each pair
// of groups into a 16-wide one-hot group: pd_lo for bits [3:0] and pd_hi for
// bits [7:4]. These lines are driven to the sub-arrays, whose own final stage
// forms the 256 wordlines. Bit 8 picks which of a way's two sub-arrays holds
// the set (sa_sel); that mapping is this design's choice.
// Purely combinational.
module mat_predecoder (
  input  logic        en,
  input  logic [8:0]  idx,
  output logic [15:0] pd_lo,
  output logic [15:0] pd_hi,
  output logic [1:0]  sa_sel
);
  logic [3:0] d0, d1, d2, d3;

  function automatic logic [3:0] dec2to4(input logic [1:0] a, input logic g);
    dec2to4 = g ? (4'b0001 << a) : 4'b0000;
  endfunction

  always_comb begin
    d0 = dec2to4(idx[1:0], en);
    d1 = dec2to4(idx[3:2], 1'b1);
    d2 = dec2to4(idx[5:4], 1'b1);
    d3 = dec2to4(idx[7:6], 1'b1);
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        pd_lo[i*4 + j] = d1[i] & d0[j];
        pd_hi[i*4 + j] = d3[i] & d2[j];
      end
    end
    sa_sel = idx[8] ? 2'b10 : 2'b01;
  end
endmodule
