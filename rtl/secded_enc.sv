// secded_enc: extended Hamming (SECDED) encoder for one data-array row.
//
// The 512 data bits and 10 check bits occupy Hamming positions 1..522;
// check bit k sits at position 2^k and makes the XOR over all positions whose
// index has bit k set equal to zero. Data bits fill the remaining positions
// in ascending order. Codeword bit p-1 holds position p, and bit 522 holds
// the overall parity of bits 0..521, which turns single-error correction into
// double-error detection. The original design gives 11 ECC bits per 512-bit row;
// the choice of this code is this design's. Purely combinational.
module secded_enc #(
  parameter int unsigned DATA_W = 512,
  parameter int unsigned CW_W   = 523
) (
  input  logic [DATA_W-1:0] data,
  output logic [CW_W-1:0]   cw
);
  localparam int unsigned NPOS = CW_W - 1;      // Hamming positions 1..NPOS
  localparam int unsigned NCHK = $clog2(NPOS + 1);

  always_comb begin
    int unsigned d;
    logic [NCHK-1:0] syn;
    cw  = '0;
    d   = 0;
    syn = '0;
    for (int unsigned p = 1; p <= NPOS; p++) begin
      if ((p & (p - 1)) != 0) begin
        cw[p-1] = data[d];
        if (data[d]) syn = syn ^ NCHK'(p);
        d++;
      end
    end
    for (int unsigned k = 0; k < NCHK; k++)
      cw[(1 << k) - 1] = syn[k];
    cw[CW_W-1] = ^cw[NPOS-1:0];
  end
endmodule
