// data_subarray: one 256-row data SRAM sub-array; each row is a 64-byte block
// with its 11 ECC bits (523 bits).
//
// The array is driven by one-hot wordlines that already include the CAM
// gating. With a wordline high and we=1 the row is written at the clock
// edge; with we=0 it is read and the row appears on rdata one cycle later
// with rvalid=1. With no wordline high nothing is read and rvalid is 0 next
// cycle, which is how an inhibited or mismatching way stays silent. rdata is
// zero when rvalid is 0 so that outputs of several sub-arrays can be ORed.
// The cell array itself is a plain memory array; no bit interleaving, as the
// original design prescribes (ECC instead).
module data_subarray #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned CW   = 523
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ROWS-1:0] wl,
  input  logic            we,
  input  logic [CW-1:0]   wdata,
  output logic            rvalid,
  output logic [CW-1:0]   rdata
);
  localparam int unsigned AW = $clog2(ROWS);

  logic [CW-1:0] mem [ROWS];
  logic [AW-1:0] row;
  logic          any;

  // Wordlines are one-hot, so ORing the indices of the high ones gives the row.
  always_comb begin
    row = '0;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) row = row | AW'(r);
    any = |wl;
  end

  always_ff @(posedge clk) begin
    if (any && we) mem[row] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      rvalid <= any && !we;
      rdata  <= (any && !we) ? mem[row] : '0;
    end
  end
endmodule
