// llc_tile: one 2MB, 16-way LLC tile with embedded way prediction, built from
// four independently operating 512KB banks.
//
// A request carries a physical block address, split here as
// offset [5:0] | bank [7:6] | set [16:8] | tag [48:17]. The tile routes the
// request to the bank named by the bank bits; req_ready is that bank's
// ready. Each bank answers on its own response ports, brought out as arrays
// indexed by bank, so answers of different banks never collide and are never
// delayed. The event pulses of every bank are brought out for accuracy and
// mechanism counters.
// Four banks, 512 sets, 16 ways and 64-byte blocks follow the original design; the
// address split (with a 32-bit tag) and the per-bank response ports are this
// design's choices. The cores, network, directory and memory around the tile
// are outside it.
module llc_tile
  import ewp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  op_e         req_op,
  input  logic [PADDR_W-1:0] req_addr,
  input  block_t      req_wdata,
  input  logic [ID_W-1:0] req_id,
  output logic   [NUM_BANKS-1:0] dresp_valid,
  output dresp_e [NUM_BANKS-1:0] dresp_kind,
  output logic   [NUM_BANKS-1:0][ID_W-1:0] dresp_id,
  output block_t [NUM_BANKS-1:0] dresp_data,
  output tag_t   [NUM_BANKS-1:0] dresp_tag,
  output set_idx_t [NUM_BANKS-1:0] dresp_set,
  output logic   [NUM_BANKS-1:0] dresp_ecc_err,
  output logic   [NUM_BANKS-1:0] tresp_valid,
  output tresp_e [NUM_BANKS-1:0] tresp_kind,
  output logic   [NUM_BANKS-1:0][ID_W-1:0] tresp_id,
  output logic   [NUM_BANKS-1:0] tresp_dirty,
  output tag_t   [NUM_BANKS-1:0] tresp_tag,
  output bank_stats_t [NUM_BANKS-1:0] stats
);
  logic [BANK_W-1:0]    bank;
  set_idx_t             set;
  tag_t                 tag;
  logic [NUM_BANKS-1:0] b_ready;

  assign bank = req_addr[OFFS_W +: BANK_W];
  assign set  = req_addr[OFFS_W + BANK_W +: SET_W];
  assign tag  = req_addr[OFFS_W + BANK_W + SET_W +: TAG_W];
  assign req_ready = b_ready[bank];

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    llc_bank u_bank (
      .clk          (clk),
      .rst_n        (rst_n),
      .req_valid    (req_valid && (bank == BANK_W'(b))),
      .req_ready    (b_ready[b]),
      .req_op       (req_op),
      .req_tag      (tag),
      .req_set      (set),
      .req_wdata    (req_wdata),
      .req_id       (req_id),
      .dresp_valid  (dresp_valid[b]),
      .dresp_kind   (dresp_kind[b]),
      .dresp_id     (dresp_id[b]),
      .dresp_data   (dresp_data[b]),
      .dresp_tag    (dresp_tag[b]),
      .dresp_set    (dresp_set[b]),
      .dresp_ecc_err(dresp_ecc_err[b]),
      .tresp_valid  (tresp_valid[b]),
      .tresp_kind   (tresp_kind[b]),
      .tresp_id     (tresp_id[b]),
      .tresp_dirty  (tresp_dirty[b]),
      .tresp_tag    (tresp_tag[b]),
      .stats        (stats[b])
    );
  end
endmodule
