// htree: the intra-bank H-tree of one bank's data pipeline.
//
// Request side: an operation from the controller, with its metadata, moves
// through REQ_STAGES pipeline registers and is then presented to all mats at
// once (mat_op). Every mat sees the same set, partial tag and write data; the
// per-way fields are sliced by the bank. Response side: the mats answer one
// cycle later; their outputs are ORed (at most one way fires, since the
// inhibit bits leave one uninhibited block per partial tag and set) and move
// through RESP_STAGES registers to out_*. The metadata follows the same path
// so that each answer leaves with its own operation. The whole path is
// REQ_STAGES + 1 + RESP_STAGES cycles, 15 by default: the original design's
// parallel-access latency. The split into stages is this design's choice.
// out_valid marks every operation; out_rvalid marks one that read a block.
module htree
  import ewp_pkg::*;
#(
  parameter int unsigned MATS        = ewp_pkg::NUM_MATS,
  parameter int unsigned REQ_STAGES  = 7,
  parameter int unsigned RESP_STAGES = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dp_op_t          in_op,
  input  dp_meta_t        in_meta,
  output dp_op_t          mat_op,
  input  logic [MATS-1:0] mat_rvalid,
  input  cw_t             mat_rdata [MATS],
  input  logic [MATS-1:0][1:0] mat_rway,
  output logic            out_valid,
  output dp_meta_t        out_meta,
  output logic            out_rvalid,
  output cw_t             out_rdata,
  output way_t            out_rway,
  output logic            out_multi    // more than one mat answered
);
  dp_op_t   req_q  [REQ_STAGES];
  dp_meta_t meta_q [REQ_STAGES + 1 + RESP_STAGES];
  logic     mv_q   [REQ_STAGES + 1 + RESP_STAGES];

  typedef struct packed {
    logic rvalid;
    logic multi;
    way_t rway;
    cw_t  rdata;
  } resp_t;
  resp_t resp_q [RESP_STAGES];
  resp_t merged;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < REQ_STAGES; i++) req_q[i] <= '0;
      for (int i = 0; i < REQ_STAGES + 1 + RESP_STAGES; i++) begin
        meta_q[i] <= '0;
        mv_q[i]   <= 1'b0;
      end
      for (int i = 0; i < RESP_STAGES; i++) resp_q[i] <= '0;
    end else begin
      req_q[0] <= in_op;
      for (int i = 1; i < REQ_STAGES; i++) req_q[i] <= req_q[i-1];
      meta_q[0] <= in_meta;
      mv_q[0]   <= in_op.en;
      for (int i = 1; i < REQ_STAGES + 1 + RESP_STAGES; i++) begin
        meta_q[i] <= meta_q[i-1];
        mv_q[i]   <= mv_q[i-1];
      end
      resp_q[0] <= merged;
      for (int i = 1; i < RESP_STAGES; i++) resp_q[i] <= resp_q[i-1];
    end
  end

  assign mat_op = req_q[REQ_STAGES-1];

  always_comb begin
    int unsigned n;
    merged = '0;
    n = 0;
    for (int m = 0; m < MATS; m++) begin
      if (mat_rvalid[m]) begin
        n++;
        merged.rvalid = 1'b1;
        merged.rway   = merged.rway | way_t'(2 * m + int'(mat_rway[m][1]));
      end
      merged.rdata = merged.rdata | mat_rdata[m];
    end
    merged.multi = (n > 1);
  end

  assign out_valid  = mv_q[REQ_STAGES + RESP_STAGES];
  assign out_meta   = meta_q[REQ_STAGES + RESP_STAGES];
  assign out_rvalid = resp_q[RESP_STAGES-1].rvalid;
  assign out_rdata  = resp_q[RESP_STAGES-1].rdata;
  assign out_rway   = resp_q[RESP_STAGES-1].rway;
  assign out_multi  = resp_q[RESP_STAGES-1].multi;
endmodule
