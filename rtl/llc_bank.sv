// llc_bank: one 512KB bank of the LLC tile with embedded way prediction.
//
// Organisation: 512 sets x 16 ways x 64B. The tag side is a tag array that
// also keeps a copy of every CAM inhibit bit plus the LRU ages; the data side
// is 8 data mats (two ways each) reached through a pipelined H-tree. Tag and
// data pipelines are scheduled separately.
//
// Read: when a read is accepted and the data pipeline has no other operation
// to issue in that cycle, the read's set and partial tag go to all mats at
// once (a prediction). In every way the CAM entry of that set matches only if
// its partial tag equals the request's and its inhibit bit is clear, so at
// most one way reads out. TAG_LAT cycles later the tag lookup resolves: it
// knows from the inhibit copies which way was predicted and whether it was
// the hit way. If so, the predicted data is delivered DATA_LAT cycles after
// acceptance (15). Otherwise (wrong way, no way, or no prediction issued)
// the hit way is read sequentially and answers TAG_LAT + DATA_LAT cycles
// after acceptance (21). A miss answers on the tag response channel.
//
// Sequential accesses never use a separate way select: the controller drives
// the CAM comparison lines from the known CAM contents. The target way gets
// its own inhibit value on its inhibit comparison line, so it matches; every
// other way gets the inverse of its inhibit bit, so none can match. The same
// trick addresses writes, fills, evictions and invalidations. Inhibit bits
// changed by a lookup travel with that operation as CAM writes, or in a
// CAM-only operation that fires no wordline.
//
// Write (a block written back from an L1) updates a present block and sets
// its dirty bit; a write miss is reported. Fill allocates a returned block
// into the first invalid or the LRU way; a dirty victim is read out first
// (eviction data response). Invalidate clears a block and returns its data
// if dirty.
//
// Interface: req_* is a valid/ready request port; one request is in the tag
// pipeline at a time, and the next can be accepted in the cycle the current
// one resolves. dresp_* returns blocks (read data or eviction data, after
// ECC correction); tresp_* returns tag-only answers. Neither response port
// can be stalled. req_ready stays low for NUM_SETS cycles after reset while
// the tag array is cleared.
//
// The prediction scheme, inhibit rules, forced-match accesses, bank geometry
// and the 15/21-cycle latencies follow the original design. One-at-a-time tag
// pipeline, write/fill/invalidate semantics, response ports and the reset
// walk are this design's choices.
module llc_bank
  import ewp_pkg::*;
#(
  parameter int unsigned TAG_LATENCY = ewp_pkg::TAG_LAT
) (
  input  logic        clk,
  input  logic        rst_n,
  // request
  input  logic        req_valid,
  output logic        req_ready,
  input  op_e         req_op,
  input  tag_t        req_tag,
  input  set_idx_t    req_set,
  input  block_t      req_wdata,
  input  logic [ID_W-1:0] req_id,
  // block responses
  output logic        dresp_valid,
  output dresp_e      dresp_kind,
  output logic [ID_W-1:0] dresp_id,
  output block_t      dresp_data,
  output tag_t        dresp_tag,
  output set_idx_t    dresp_set,
  output logic        dresp_ecc_err,
  // tag-only responses
  output logic        tresp_valid,
  output tresp_e      tresp_kind,
  output logic [ID_W-1:0] tresp_id,
  output logic        tresp_dirty,
  output tag_t        tresp_tag,
  // events
  output bank_stats_t stats
);
  typedef enum logic [2:0] {ST_INIT, ST_IDLE, ST_LOOKUP, ST_RESOLVE, ST_FILL2} state_e;

  state_e            state_q;
  logic [7:0]        cnt_q;
  set_idx_t          init_q;
  op_e               cur_op_q;
  tag_t              cur_tag_q;
  set_idx_t          cur_set_q;
  block_t            cur_wdata_q;
  logic [ID_W-1:0]   cur_id_q;
  logic              cur_pred_q;
  logic [SLOT_W-1:0] cur_slot_q, slot_q;
  logic [(1<<SLOT_W)-1:0] pred_ok_q, pred_exp_q;
  way_t              pred_way_q [1<<SLOT_W];
  dp_op_t            fill2_op_q;
  dp_meta_t          fill2_meta_q;

  // ---------------- tag side ----------------
  tag_set_t  ts_rd, ts_wr, ts_init, ts_wr_mux;
  logic      ts_we;
  set_idx_t  ts_wr_set;

  tag_array #(.SETS(NUM_SETS)) u_tags (
    .clk    (clk),
    .rd_set (cur_set_q),
    .rd_data(ts_rd),
    .we     (ts_we),
    .wr_set (ts_wr_set),
    .wr_data(ts_wr_mux)
  );

  wayvec_t valid_v, inh_v, dirty_v;
  always_comb begin
    for (int w = 0; w < NUM_WAYS; w++) begin
      valid_v[w] = ts_rd.way[w].valid;
      inh_v[w]   = ts_rd.way[w].inh;
      dirty_v[w] = ts_rd.way[w].dirty;
    end
  end

  way_t victim, hit_way, pred_way, fill_way;
  logic hit, pred_valid, pred_correct;
  wayvec_t pmatch, new_inh;
  cls_e  cls;
  ptag_t fill_old_ptag;
  logic  lru_touch;
  way_t  lru_way;
  logic [NUM_WAYS-1:0][WAY_W-1:0] new_ages, unused_ages;

  lru_update u_lru_victim (
    .ages     (ts_rd.age),
    .valid    (valid_v),
    .touch    (1'b0),
    .touch_way('0),
    .new_ages (unused_ages),
    .victim   (victim)
  );

  inhibit_ctrl u_inh (
    .set_in       (ts_rd),
    .op           (cur_op_q),
    .tag          (cur_tag_q),
    .victim       (victim),
    .hit          (hit),
    .hit_way      (hit_way),
    .pmatch       (pmatch),
    .pred_valid   (pred_valid),
    .pred_way     (pred_way),
    .pred_correct (pred_correct),
    .cls          (cls),
    .fill_way     (fill_way),
    .fill_old_ptag(fill_old_ptag),
    .new_inh      (new_inh)
  );

  lru_update u_lru_touch (
    .ages     (ts_rd.age),
    .valid    (valid_v),
    .touch    (lru_touch),
    .touch_way(lru_way),
    .new_ages (new_ages),
    .victim   ()
  );

  cw_t enc_wdata;
  secded_enc #(.DATA_W(DATA_W), .CW_W(CW_W)) u_enc (
    .data(cur_wdata_q),
    .cw  (enc_wdata)
  );

  // Operation that reaches exactly one way (force=1) or none (force=0) by
  // driving the inhibit comparison lines from the known CAM contents.
  function automatic dp_op_t forced_op(input set_idx_t s, input ptag_t pt,
                                       input logic force_en, input way_t w,
                                       input wayvec_t inh_known);
    dp_op_t o;
    o = '0;
    o.en   = 1'b1;
    o.set  = s;
    o.ptag = pt;
    for (int i = 0; i < NUM_WAYS; i++)
      o.inh_cmp[i] = (force_en && i == int'(w)) ? inh_known[i] : ~inh_known[i];
    return o;
  endfunction

  // ---------------- resolve decisions ----------------
  dp_op_t   res_op, res_op2;
  dp_meta_t res_meta, res_meta2;
  logic     res_fill2;
  logic     t_valid;
  tresp_e   t_kind;
  logic     t_dirty;
  tag_t     t_tag;
  wayvec_t  inh_chg;
  ptag_t    rptag;

  always_comb begin
    rptag     = cur_tag_q[PTAG_W-1:0];
    inh_chg   = new_inh ^ inh_v;
    res_op    = '0;
    res_op2   = '0;
    res_meta  = '0;
    res_meta2 = '0;
    res_fill2 = 1'b0;
    t_valid   = 1'b0;
    t_kind    = TR_READ_MISS;
    t_dirty   = 1'b0;
    t_tag     = '0;
    lru_touch = 1'b0;
    lru_way   = hit_way;
    ts_wr     = ts_rd;
    for (int w = 0; w < NUM_WAYS; w++) ts_wr.way[w].inh = new_inh[w];
    res_meta.kind = DK_NONE;
    res_meta.slot = cur_slot_q;
    res_meta.id   = cur_id_q;
    res_meta.tag  = cur_tag_q;
    res_meta.set  = cur_set_q;
    res_meta2     = res_meta;

    unique case (cur_op_q)
      OP_READ: begin
        if (hit) begin
          lru_touch = 1'b1;
          if (!(cur_pred_q && pred_correct)) begin
            res_op = forced_op(cur_set_q, rptag, 1'b1, hit_way, inh_v);
            res_meta.kind = DK_SEQ;
          end
        end else begin
          t_valid = 1'b1;
          t_kind  = TR_READ_MISS;
        end
        if (!res_op.en && inh_chg != '0)
          res_op = forced_op(cur_set_q, rptag, 1'b0, hit_way, inh_v);
      end
      OP_WRITE: begin
        t_valid = 1'b1;
        if (hit) begin
          t_kind    = TR_WRITE_ACK;
          lru_touch = 1'b1;
          ts_wr.way[hit_way].dirty = 1'b1;
          res_op       = forced_op(cur_set_q, rptag, 1'b1, hit_way, inh_v);
          res_op.wr    = 1'b1;
          res_op.wdata = enc_wdata;
        end else begin
          t_kind = TR_WRITE_MISS;
          if (inh_chg != '0)
            res_op = forced_op(cur_set_q, rptag, 1'b0, hit_way, inh_v);
        end
      end
      OP_FILL: begin
        t_valid   = 1'b1;
        t_kind    = TR_FILL_ACK;
        t_tag     = ts_rd.way[fill_way].tag;
        lru_touch = 1'b1;
        lru_way   = fill_way;
        ts_wr.way[fill_way].tag   = cur_tag_q;
        ts_wr.way[fill_way].valid = 1'b1;
        ts_wr.way[fill_way].dirty = hit ? dirty_v[fill_way] : 1'b0;
        // The write that installs the block and its CAM entry. It is
        // steered by the CAM contents before the write.
        res_op2 = forced_op(cur_set_q, fill_old_ptag, 1'b1, fill_way, inh_v);
        res_op2.wr    = 1'b1;
        res_op2.wdata = enc_wdata;
        res_op2.cam_we_ptag[fill_way] = 1'b1;
        res_op2.cam_ptag = rptag;
        if (!hit && valid_v[fill_way] && dirty_v[fill_way]) begin
          t_dirty = 1'b1;
          res_fill2 = 1'b1;
          res_op = forced_op(cur_set_q, fill_old_ptag, 1'b1, fill_way, inh_v);
          res_meta.kind = DK_EVICT;
          res_meta.tag  = ts_rd.way[fill_way].tag;
        end
      end
      OP_INVAL: begin
        t_valid = 1'b1;
        t_kind  = TR_INVAL_ACK;
        if (hit) begin
          ts_wr.way[hit_way].valid = 1'b0;
          ts_wr.way[hit_way].dirty = 1'b0;
          if (dirty_v[hit_way]) begin
            t_dirty = 1'b1;
            res_op = forced_op(cur_set_q, rptag, 1'b1, hit_way, inh_v);
            res_meta.kind = DK_EVICT;
          end else if (inh_chg != '0) begin
            res_op = forced_op(cur_set_q, rptag, 1'b0, hit_way, inh_v);
          end
        end
      end
      default: ;
    endcase

    // CAM inhibit updates ride on the first operation; a fill without an
    // eviction issues its install write directly.
    if (cur_op_q == OP_FILL) begin
      res_op2.cam_we_inh = inh_chg;
      res_op2.cam_we_inh[fill_way] = 1'b1;
      res_op2.cam_inh = new_inh;
      if (!res_fill2) res_op = res_op2;
    end else begin
      res_op.cam_we_inh = inh_chg;
      res_op.cam_inh    = new_inh;
    end
    if (lru_touch) ts_wr.age = new_ages;
  end

  // ---------------- scheduling ----------------
  logic   can_accept, accept, dp_busy, issue_pred;
  dp_op_t   dp_op;
  dp_meta_t dp_meta;

  assign can_accept = (state_q == ST_IDLE) || (state_q == ST_FILL2) ||
                      (state_q == ST_RESOLVE && !res_fill2);
  assign req_ready  = can_accept;
  assign accept     = req_valid && can_accept;
  assign dp_busy    = (state_q == ST_RESOLVE && res_op.en) || (state_q == ST_FILL2);
  assign issue_pred = accept && (req_op == OP_READ) && !dp_busy;

  always_comb begin
    dp_op   = '0;
    dp_meta = '0;
    if (state_q == ST_RESOLVE && res_op.en) begin
      dp_op   = res_op;
      dp_meta = res_meta;
    end else if (state_q == ST_FILL2) begin
      dp_op   = fill2_op_q;
      dp_meta = fill2_meta_q;
    end else if (issue_pred) begin
      dp_op.en      = 1'b1;
      dp_op.set     = req_set;
      dp_op.ptag    = req_tag[PTAG_W-1:0];
      dp_op.inh_cmp = '0;          // cleared inhibit bits match
      dp_meta.kind  = DK_PRED;
      dp_meta.slot  = slot_q;
      dp_meta.id    = req_id;
      dp_meta.tag   = req_tag;
      dp_meta.set   = req_set;
    end
  end

  always_comb begin
    ts_init = '0;
    for (int w = 0; w < NUM_WAYS; w++) begin
      ts_init.way[w].inh = 1'b1;
      ts_init.age[w]     = WAY_W'(w);
    end
    ts_we     = (state_q == ST_INIT) || (state_q == ST_RESOLVE);
    ts_wr_set = (state_q == ST_INIT) ? init_q : cur_set_q;
  end

  assign ts_wr_mux = (state_q == ST_INIT) ? ts_init : ts_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ST_INIT;
      cnt_q        <= '0;
      init_q       <= '0;
      cur_op_q     <= OP_READ;
      cur_tag_q    <= '0;
      cur_set_q    <= '0;
      cur_wdata_q  <= '0;
      cur_id_q     <= '0;
      cur_pred_q   <= 1'b0;
      cur_slot_q   <= '0;
      slot_q       <= '0;
      pred_ok_q    <= '0;
      pred_exp_q   <= '0;
      for (int i = 0; i < (1 << SLOT_W); i++) pred_way_q[i] <= '0;
      fill2_op_q   <= '0;
      fill2_meta_q <= '0;
    end else begin
      unique case (state_q)
        ST_INIT: begin
          init_q <= init_q + 1'b1;
          if (init_q == set_idx_t'(NUM_SETS - 1)) state_q <= ST_IDLE;
        end
        ST_LOOKUP: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == 8'd1) state_q <= ST_RESOLVE;
        end
        ST_RESOLVE: begin
          pred_ok_q[cur_slot_q]  <= cur_pred_q && pred_correct;
          pred_exp_q[cur_slot_q] <= pred_valid;
          pred_way_q[cur_slot_q] <= pred_way;
          if (res_fill2) begin
            state_q      <= ST_FILL2;
            fill2_op_q   <= res_op2;
            fill2_meta_q <= res_meta2;
          end else begin
            state_q <= ST_IDLE;
          end
        end
        ST_FILL2: state_q <= ST_IDLE;
        default:  state_q <= ST_IDLE;
      endcase
      if (accept) begin
        state_q     <= (TAG_LATENCY > 1) ? ST_LOOKUP : ST_RESOLVE;
        cnt_q       <= 8'(TAG_LATENCY - 1);
        cur_op_q    <= req_op;
        cur_tag_q   <= req_tag;
        cur_set_q   <= req_set;
        cur_wdata_q <= req_wdata;
        cur_id_q    <= req_id;
        cur_pred_q  <= issue_pred;
        cur_slot_q  <= slot_q;
      end
      if (issue_pred) slot_q <= slot_q + 1'b1;
    end
  end

  // ---------------- data side ----------------
  dp_op_t          mat_op;
  logic [NUM_MATS-1:0] mat_rvalid;
  cw_t             mat_rdata [NUM_MATS];
  logic [NUM_MATS-1:0][1:0] mat_rway;
  logic            out_valid, out_rvalid, out_multi;
  dp_meta_t        out_meta;
  cw_t             out_rdata;
  way_t            out_rway;

  htree #(.MATS(NUM_MATS), .REQ_STAGES(7), .RESP_STAGES(DATA_LAT - 8)) u_htree (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_op     (dp_op),
    .in_meta   (dp_meta),
    .mat_op    (mat_op),
    .mat_rvalid(mat_rvalid),
    .mat_rdata (mat_rdata),
    .mat_rway  (mat_rway),
    .out_valid (out_valid),
    .out_meta  (out_meta),
    .out_rvalid(out_rvalid),
    .out_rdata (out_rdata),
    .out_rway  (out_rway),
    .out_multi (out_multi)
  );

  for (genvar m = 0; m < NUM_MATS; m++) begin : g_mat
    data_mat u_mat (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (mat_op.en),
      .set        (mat_op.set),
      .ptag       (mat_op.ptag),
      .inh_cmp    (mat_op.inh_cmp[2*m +: 2]),
      .wr         (mat_op.wr),
      .wdata      (mat_op.wdata),
      .cam_we_ptag(mat_op.cam_we_ptag[2*m +: 2]),
      .cam_ptag   (mat_op.cam_ptag),
      .cam_we_inh (mat_op.cam_we_inh[2*m +: 2]),
      .cam_inh    (mat_op.cam_inh[2*m +: 2]),
      .rvalid     (mat_rvalid[m]),
      .rdata      (mat_rdata[m]),
      .rway       (mat_rway[m])
    );
  end

  logic ecc_corr, ecc_unc;
  secded_dec #(.DATA_W(DATA_W), .CW_W(CW_W)) u_dec (
    .cw           (out_rdata),
    .data         (dresp_data),
    .corrected    (ecc_corr),
    .uncorrectable(ecc_unc)
  );

  always_comb begin
    dresp_valid = 1'b0;
    dresp_kind  = DR_READ;
    unique case (out_meta.kind)
      DK_PRED:  dresp_valid = out_valid && pred_ok_q[out_meta.slot];
      DK_SEQ:   dresp_valid = out_valid;
      DK_EVICT: begin
        dresp_valid = out_valid;
        dresp_kind  = DR_EVICT;
      end
      default:  dresp_valid = 1'b0;
    endcase
    dresp_id      = out_meta.id;
    dresp_tag     = out_meta.tag;
    dresp_set     = out_meta.set;
    dresp_ecc_err = ecc_unc;
  end

  assign tresp_valid = (state_q == ST_RESOLVE) && t_valid;
  assign tresp_kind  = t_kind;
  assign tresp_id    = cur_id_q;
  assign tresp_dirty = t_dirty;
  assign tresp_tag   = t_tag;

  always_comb begin
    logic rd;
    rd = (state_q == ST_RESOLVE) && (cur_op_q == OP_READ) && cur_pred_q;
    stats = '0;
    stats.pred_unique    = rd && (cls == CLS_PRED_UNIQUE);
    stats.pred_collision = rd && (cls == CLS_PRED_COLLISION);
    stats.nopred_miss    = rd && (cls == CLS_NOPRED_MISS);
    stats.mispred        = rd && (cls == CLS_MISPRED);
    stats.overpred_miss  = rd && (cls == CLS_OVERPRED_MISS);
    stats.pred_skipped   = accept && (req_op == OP_READ) && dp_busy;
    stats.inh_update     = dp_op.en && (dp_op.cam_we_inh != '0);
    stats.forced_access  = dp_op.en && (dp_meta.kind != DK_PRED) &&
                           ((dp_op.inh_cmp ^ dp_op.cam_inh) != '0 || dp_op.wr ||
                            dp_meta.kind == DK_SEQ || dp_meta.kind == DK_EVICT) &&
                           (dp_op.wr || dp_meta.kind == DK_SEQ || dp_meta.kind == DK_EVICT);
    stats.eviction       = dresp_valid && (dresp_kind == DR_EVICT);
    stats.ecc_corrected  = dresp_valid && ecc_corr;
  end

  // The data arrays must agree with the tag side's view of the CAMs.
  always_ff @(posedge clk) begin
    if (out_valid) begin
      assert (!out_multi) else $error("llc_bank: more than one way fired");
      if (out_meta.kind == DK_PRED) begin
        assert (out_rvalid == pred_exp_q[out_meta.slot])
          else $error("llc_bank: CAM prediction disagrees with inhibit copies");
        assert (!out_rvalid || out_rway == pred_way_q[out_meta.slot])
          else $error("llc_bank: CAM predicted another way than the inhibit copies");
      end
      if (out_meta.kind == DK_SEQ || out_meta.kind == DK_EVICT)
        assert (out_rvalid) else $error("llc_bank: forced access fired no wordline");
    end
  end
endmodule
