// wl_decoder: final decode stage and wordline drivers of one data sub-array.
//
// Row r is selected when predecode line pd_hi[r/16] and pd_lo[r%16] are both
// high and the sub-array is selected (the final NAND stage). The wordline
// driver stack is where the decoder path and the CAM path meet: wordline r
// fires only if row r is selected and its CAM matchline stayed high. The raw
// row select also addresses CAM entry writes, which must not depend on a
// match; that use is this design's choice. Purely combinational.
module wl_decoder #(
  parameter int unsigned ROWS = 256
) (
  input  logic [15:0]     pd_lo,
  input  logic [15:0]     pd_hi,
  input  logic            sel,
  input  logic [ROWS-1:0] match,
  output logic [ROWS-1:0] row_sel,
  output logic [ROWS-1:0] wl
);
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      row_sel[r] = sel & pd_hi[(r / 16) % 16] & pd_lo[r % 16];
      wl[r]      = row_sel[r] & match[r];
    end
  end
endmodule
