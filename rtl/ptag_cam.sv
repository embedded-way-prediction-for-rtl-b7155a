// ptag_cam: one partial-tag CAM array (the top or the bottom CAM of a
// sub-array).
//
// Each entry stores a PTAG_W-bit partial tag and an inhibit bit. Every search
// compares all entries at once against the broadcast comparison lines
// (cmp_ptag and cmp_inh); an entry keeps its matchline high only when all
// PTAG_W+1 bits are equal. In silicon this is a dynamic CAM whose precharged
// matchline is pulled down by any mismatching cell; here it is an equality
// compare. Because the inhibit bit takes part in the compare, an entry with
// inhibit=1 never matches a prediction (cmp_inh=0), and the controller can
// force or suppress any entry by choosing cmp_inh.
// Writes: wsel selects the entry; we_ptag and we_inh update its fields
// independently at the clock edge. Matchlines reflect the contents before
// that edge. Reset gives partial tag 0 and inhibit 1 (invalid line), a
// choice of this design.
module ptag_cam #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned PTAG_W  = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PTAG_W-1:0]  cmp_ptag,
  input  logic               cmp_inh,
  input  logic [ENTRIES-1:0] wsel,
  input  logic               we_ptag,
  input  logic [PTAG_W-1:0]  wptag,
  input  logic               we_inh,
  input  logic               winh,
  output logic [ENTRIES-1:0] match
);
  logic [PTAG_W-1:0] ptag_q [ENTRIES];
  logic [ENTRIES-1:0] inh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) ptag_q[e] <= '0;
      inh_q <= '1;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (wsel[e] && we_ptag) ptag_q[e] <= wptag;
        if (wsel[e] && we_inh)  inh_q[e]  <= winh;
      end
    end
  end

  always_comb begin
    for (int e = 0; e < ENTRIES; e++)
      match[e] = (ptag_q[e] == cmp_ptag) && (inh_q[e] == cmp_inh);
  end
endmodule
