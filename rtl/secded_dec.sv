// secded_dec: extended Hamming (SECDED) decoder matching secded_enc.
//
// The syndrome is the XOR of the position numbers of all set bits among
// positions 1..522; the overall parity covers the full 523-bit word. A
// nonzero overall parity means one bit flipped: it is at the syndrome's
// position (or is the parity bit itself when the syndrome is zero) and is
// corrected. A zero overall parity with a nonzero syndrome means two bits
// flipped: the data is passed on uncorrected and flagged. Purely
// combinational.
module secded_dec #(
  parameter int unsigned DATA_W = 512,
  parameter int unsigned CW_W   = 523
) (
  input  logic [CW_W-1:0]   cw,
  output logic [DATA_W-1:0] data,
  output logic              corrected,
  output logic              uncorrectable
);
  localparam int unsigned NPOS = CW_W - 1;
  localparam int unsigned NCHK = $clog2(NPOS + 1);

  always_comb begin
    int unsigned d;
    logic [NCHK-1:0] syn;
    logic            par;
    logic [CW_W-1:0] fixed;
    syn = '0;
    for (int unsigned p = 1; p <= NPOS; p++)
      if (cw[p-1]) syn = syn ^ NCHK'(p);
    par           = ^cw;
    fixed         = cw;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (par) begin
      if (syn == 0) begin
        corrected = 1'b1;                   // the overall parity bit flipped
      end else if (int'(syn) <= NPOS) begin
        corrected    = 1'b1;
        fixed[syn-1] = ~cw[syn-1];
      end else begin
        uncorrectable = 1'b1;               // syndrome points past the word
      end
    end else if (syn != 0) begin
      uncorrectable = 1'b1;
    end
    data = '0;
    d    = 0;
    for (int unsigned p = 1; p <= NPOS; p++) begin
      if ((p & (p - 1)) != 0) begin
        data[d] = fixed[p-1];
        d++;
      end
    end
  end
endmodule
