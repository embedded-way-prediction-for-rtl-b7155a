// tag_array: the tag store of one bank.
//
// One word per set holds, for each of the 16 ways, the full tag, valid and
// dirty bits and the copy of the way's CAM inhibit bit, plus the LRU ages of
// the set. Keeping the inhibit copy here means the CAMs in the data arrays
// never need a read port: the controller always knows their contents.
// The whole set is read combinationally through rd_set and written at the
// clock edge through wr_set when we=1. The array has no reset; the bank
// controller walks all sets after reset and writes them invalid.
module tag_array
  import ewp_pkg::*;
#(
  parameter int unsigned SETS = ewp_pkg::NUM_SETS
) (
  input  logic                    clk,
  input  logic [$clog2(SETS)-1:0] rd_set,
  output tag_set_t                rd_data,
  input  logic                    we,
  input  logic [$clog2(SETS)-1:0] wr_set,
  input  tag_set_t                wr_data
);
  tag_set_t mem [SETS];

  always_ff @(posedge clk) begin
    if (we) mem[wr_set] <= wr_data;
  end

  assign rd_data = mem[rd_set];
endmodule
