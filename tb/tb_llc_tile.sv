// tb_llc_tile: end-to-end test of the full-size four-bank LLC tile, all parameters at their defaults.
//
// A reference model keeps, for every used set, the tag, valid, dirty and
// inhibit state, the data and the LRU ages of all 16 ways, written
// independently of the RTL from the rules the design follows. Random reads,
// write-backs, fills and invalidations use a small tag space in which many
// tags share a partial tag, so partial-tag collisions, over-predictions,
// evictions and inhibit successors all occur. Requests are issued as fast
// as the bank accepts them, so reads also meet a busy data pipeline.
// Checks: every response's kind, data, tag and exact cycle (a correctly
// predicted read answers 15 cycles after acceptance, any other read 21, tag
// answers 6), no stray response, outcome-class totals equal to the model's,
// and single-bit errors injected into a data row corrected on read. Each
// mechanism must be seen at least once.
module tb_llc_tile;
  import ewp_pkg::*;
  localparam int NB   = 4;
  localparam int NOPS = 6000;
  localparam int NS   = 4;

  logic clk = 0, rst_n = 0;
  int   cyc = 0;
  logic req_valid, req_ready;
  op_e  req_op;
  tag_t req_tag;
  set_idx_t req_set;
  logic [BANK_W-1:0] req_bank;
  block_t req_wdata;
  logic [ID_W-1:0] req_id;
  logic   [NB-1:0] dv;
  dresp_e [NB-1:0] dk;
  logic   [NB-1:0][ID_W-1:0] did;
  block_t [NB-1:0] dd;
  tag_t   [NB-1:0] dtag;
  set_idx_t [NB-1:0] dset;
  logic   [NB-1:0] derr;
  logic   [NB-1:0] tv;
  tresp_e [NB-1:0] tk;
  logic   [NB-1:0][ID_W-1:0] tid;
  logic   [NB-1:0] tdirty;
  tag_t   [NB-1:0] ttag;
  bank_stats_t [NB-1:0] st;

  logic [PADDR_W-1:0] req_addr;
  assign req_addr = {req_tag, req_set, req_bank, 6'($urandom_range(0))};

  llc_tile dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready), .req_op(req_op),
    .req_addr(req_addr), .req_wdata(req_wdata), .req_id(req_id),
    .dresp_valid(dv), .dresp_kind(dk), .dresp_id(did), .dresp_data(dd), .dresp_tag(dtag),
    .dresp_set(dset), .dresp_ecc_err(derr), .tresp_valid(tv), .tresp_kind(tk), .tresp_id(tid),
    .tresp_dirty(tdirty), .tresp_tag(ttag), .stats(st));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  initial begin
    repeat (245000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  set_idx_t sets [NS] = '{9'd0, 9'd1, 9'd300, 9'd511};
  tag_t  m_tag   [NB][NS][NUM_WAYS];
  logic  m_valid [NB][NS][NUM_WAYS];
  logic  m_dirty [NB][NS][NUM_WAYS];
  logic  m_inh   [NB][NS][NUM_WAYS];
  int    m_age   [NB][NS][NUM_WAYS];
  block_t m_data [NB][NS][NUM_WAYS];
  logic  m_flip  [NB][NS];

  typedef struct { int b; int id; int cyc; int lat; int kind; block_t data; tag_t tag; logic dirty; } exp_t;
  exp_t exp_d [$];
  exp_t exp_t_q [$];

  int n_cls_m [5], n_cls_d [5];
  int n_skip = 0, n_inh = 0, n_forced = 0, n_evict = 0, n_ecc = 0, n_lat15 = 0, n_lat21 = 0;
  int n_bank [NB];

  function automatic int ptag_of(tag_t t); return int'(t[PTAG_W-1:0]); endfunction

  function automatic int mru_succ(int b, int s, int excl, int pt);
    int best, bage;
    best = -1; bage = 999;
    for (int w = 0; w < NUM_WAYS; w++)
      if (w != excl && m_valid[b][s][w] && ptag_of(m_tag[b][s][w]) == pt && m_age[b][s][w] < bage) begin
        best = w; bage = m_age[b][s][w];
      end
    return best;
  endfunction

  function automatic void touch(int b, int s, int w);
    for (int i = 0; i < NUM_WAYS; i++)
      if (m_age[b][s][i] < m_age[b][s][w]) m_age[b][s][i]++;
    m_age[b][s][w] = 0;
  endfunction

  function automatic block_t rnd_block();
    block_t v;
    for (int k = 0; k < DATA_W; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  // Apply one accepted request to the model and queue the expected answers.
  function automatic void model(int b, int s, op_e op, tag_t tag, block_t wd, int id, int ca,
                                logic skipped);
    int h, p, np, v, sc;
    exp_t e;
    h = -1; p = -1; np = 0;
    for (int w = 0; w < NUM_WAYS; w++) begin
      if (m_valid[b][s][w] && m_tag[b][s][w] == tag) h = w;
      if (p < 0 && ptag_of(m_tag[b][s][w]) == ptag_of(tag) && !m_inh[b][s][w]) p = w;
      if (m_valid[b][s][w] && ptag_of(m_tag[b][s][w]) == ptag_of(tag)) np++;
    end
    e.b = b; e.id = id; e.lat = 0; e.dirty = 0; e.tag = tag; e.data = '0;
    case (op)
      OP_READ, OP_WRITE: begin
        if (op == OP_READ && !skipped) begin
          if (h >= 0) n_cls_m[(p == h) ? ((np > 1) ? 1 : 0) : 3]++;
          else        n_cls_m[(p >= 0) ? 4 : 2]++;
        end
        if (op == OP_READ && h >= 0) begin
          e.kind = 0; e.data = m_data[b][s][h];
          e.lat = (!skipped && p == h) ? 15 : 21;
          e.cyc = ca + e.lat;
          exp_d.push_back(e);
        end else begin
          e.kind = (op == OP_READ) ? int'(TR_READ_MISS) : (h >= 0) ? int'(TR_WRITE_ACK) : int'(TR_WRITE_MISS);
          e.cyc = ca + 6;
          exp_t_q.push_back(e);
        end
        for (int w = 0; w < NUM_WAYS; w++)
          if (m_valid[b][s][w] && ptag_of(m_tag[b][s][w]) == ptag_of(tag)) m_inh[b][s][w] = 1;
        if (h >= 0) begin
          m_inh[b][s][h] = 0;
          touch(b, s, h);
          if (op == OP_WRITE) begin
            m_data[b][s][h] = wd; m_dirty[b][s][h] = 1;
            if (h == 0) m_flip[b][s] = 0;
          end
        end
      end
      OP_FILL: begin
        v = -1;
        for (int w = NUM_WAYS - 1; w >= 0; w--) if (!m_valid[b][s][w]) v = w;
        if (v < 0) for (int w = 0; w < NUM_WAYS; w++) if (m_age[b][s][w] == NUM_WAYS - 1) v = w;
        e.kind = int'(TR_FILL_ACK); e.cyc = ca + 6; e.tag = m_tag[b][s][v];
        e.dirty = m_valid[b][s][v] && m_dirty[b][s][v];
        exp_t_q.push_back(e);
        if (e.dirty) begin
          e.kind = 1; e.data = m_data[b][s][v]; e.cyc = ca + 21;
          exp_d.push_back(e);
        end
        if (m_valid[b][s][v] && !m_inh[b][s][v]) begin
          sc = mru_succ(b, s, v, ptag_of(m_tag[b][s][v]));
          if (sc >= 0) m_inh[b][s][sc] = 0;
        end
        for (int w = 0; w < NUM_WAYS; w++)
          if (w != v && m_valid[b][s][w] && ptag_of(m_tag[b][s][w]) == ptag_of(tag)) m_inh[b][s][w] = 1;
        m_inh[b][s][v] = 0; m_tag[b][s][v] = tag; m_valid[b][s][v] = 1; m_dirty[b][s][v] = 0;
        m_data[b][s][v] = wd;
        if (v == 0) m_flip[b][s] = 0;
        touch(b, s, v);
      end
      default: begin
        e.kind = int'(TR_INVAL_ACK); e.cyc = ca + 6;
        e.dirty = (h >= 0) && m_dirty[b][s][h];
        exp_t_q.push_back(e);
        if (h >= 0) begin
          if (e.dirty) begin
            e.kind = 1; e.data = m_data[b][s][h]; e.cyc = ca + 21;
            exp_d.push_back(e);
          end
          m_inh[b][s][h] = 1;
          if (p == h) begin
            sc = mru_succ(b, s, h, ptag_of(tag));
            if (sc >= 0) m_inh[b][s][sc] = 0;
          end
          m_valid[b][s][h] = 0; m_dirty[b][s][h] = 0;
        end
      end
    endcase
  endfunction

  // ---------------- response checking ----------------
  always @(negedge clk) begin
    if (rst_n) begin
      for (int b = 0; b < NB; b++) begin
        if (st[b].pred_unique)    n_cls_d[0]++;
        if (st[b].pred_collision) n_cls_d[1]++;
        if (st[b].nopred_miss)    n_cls_d[2]++;
        if (st[b].mispred)        n_cls_d[3]++;
        if (st[b].overpred_miss)  n_cls_d[4]++;
        if (st[b].inh_update)     n_inh++;
        if (st[b].forced_access)  n_forced++;
        if (st[b].eviction)       n_evict++;
        if (st[b].ecc_corrected)  n_ecc++;
        if (dv[b]) begin
          int k, kind;
          kind = (dk[b] == DR_EVICT) ? 1 : 0;
          k = -1;
          foreach (exp_d[i]) if (k < 0 && exp_d[i].b == b && exp_d[i].id == int'(did[b]) && exp_d[i].kind == kind) k = i;
          checks++;
          if (k < 0) begin
            failures++; $display("FAIL unexpected data response bank %0d id %0d kind %0d", b, did[b], kind);
          end else begin
            if (exp_d[k].cyc != cyc || exp_d[k].data !== dd[b] || derr[b] ||
                (kind == 1 && exp_d[k].tag !== dtag[b])) begin
              failures++;
              $display("FAIL data response bank %0d id %0d kind %0d cyc %0d exp %0d data_ok %0d",
                       b, did[b], kind, cyc, exp_d[k].cyc, exp_d[k].data === dd[b]);
            end
            if (kind == 0 && exp_d[k].lat == 15) n_lat15++;
            if (kind == 0 && exp_d[k].lat == 21) n_lat21++;
            exp_d.delete(k);
          end
        end
        if (tv[b]) begin
          int k;
          k = -1;
          foreach (exp_t_q[i]) if (k < 0 && exp_t_q[i].b == b && exp_t_q[i].id == int'(tid[b])) k = i;
          checks++;
          if (k < 0) begin
            failures++; $display("FAIL unexpected tag response bank %0d id %0d", b, tid[b]);
          end else begin
            if (exp_t_q[k].cyc != cyc || exp_t_q[k].kind != int'(tk[b]) || exp_t_q[k].dirty !== tdirty[b] ||
                (tk[b] == TR_FILL_ACK && exp_t_q[k].tag !== ttag[b])) begin
              failures++;
              $display("FAIL tag response bank %0d id %0d kind %0d/%0d cyc %0d/%0d", b, tid[b],
                       tk[b], exp_t_q[k].kind, cyc, exp_t_q[k].cyc);
            end
            exp_t_q.delete(k);
          end
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    int id;
    req_valid = 0; req_op = OP_READ; req_tag = '0; req_set = '0; req_bank = '0;
    req_wdata = '0; req_id = '0;
    for (int i = 0; i < 5; i++) begin n_cls_m[i] = 0; n_cls_d[i] = 0; end
    for (int b = 0; b < NB; b++) begin
      n_bank[b] = 0;
      for (int s = 0; s < NS; s++) begin
        m_flip[b][s] = 0;
        for (int w = 0; w < NUM_WAYS; w++) begin
          m_tag[b][s][w] = '0; m_valid[b][s][w] = 0; m_dirty[b][s][w] = 0;
          m_inh[b][s][w] = 1; m_age[b][s][w] = w; m_data[b][s][w] = '0;
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    id = 0;
    for (int t = 0; t < NOPS; t++) begin
      int b, s, r, hi, pt;
      logic present, skipped;
      op_e op;
      tag_t tag;
      block_t wd;
      @(negedge clk);
      b = $urandom_range(NB - 1);
      s = $urandom_range(NS - 1);
      r = $urandom_range(99);
      op = (r < 45) ? OP_READ : (r < 60) ? OP_WRITE : (r < 85) ? OP_FILL : OP_INVAL;
      do begin
        hi = $urandom_range(t % 2 ? 5 : 2); pt = $urandom_range(t % 2 ? 2 : 15);
        tag = tag_t'((hi << PTAG_W) | pt);
        present = 0;
        for (int w = 0; w < NUM_WAYS; w++) if (m_valid[b][s][w] && m_tag[b][s][w] == tag) present = 1;
      end while (op == OP_FILL && present);
      wd = rnd_block();
      // occasionally flip one stored bit of a valid block in way 0 of bank 0
      if (b == 0 && t % 11 == 5 && m_valid[0][s][0] && !m_flip[0][s] && exp_d.size() == 0 &&
          exp_t_q.size() == 0) begin
        int bit_i;
        bit_i = $urandom_range(CW_W - 1);
        if (sets[s][8]) dut.g_bank[0].u_bank.g_mat[0].u_mat.g_sa[1].u_sram.mem[sets[s][7:0]][bit_i] = ~dut.g_bank[0].u_bank.g_mat[0].u_mat.g_sa[1].u_sram.mem[sets[s][7:0]][bit_i];
        else            dut.g_bank[0].u_bank.g_mat[0].u_mat.g_sa[0].u_sram.mem[sets[s][7:0]][bit_i] = ~dut.g_bank[0].u_bank.g_mat[0].u_mat.g_sa[0].u_sram.mem[sets[s][7:0]][bit_i];
        m_flip[0][s] = 1;
      end
      req_valid = 1; req_op = op; req_tag = tag; req_set = sets[s]; req_bank = BANK_W'(b);
      req_wdata = wd; req_id = ID_W'(id);
      forever begin
        #4;
        if (req_ready) break;
        @(negedge clk);
      end
      skipped = st[b].pred_skipped;
      if (skipped) n_skip++;
      n_bank[b]++;
      model(b, s, op, tag, wd, id, cyc, skipped);
      id = (id + 1) % 256;
      @(posedge clk);
      #1 req_valid = 0;
      if ($urandom_range(1) == 0) repeat ($urandom_range(8)) @(posedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (exp_d.size() != 0 || exp_t_q.size() != 0) begin
      failures++; $display("FAIL %0d data and %0d tag responses missing", exp_d.size(), exp_t_q.size());
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_cls_m[i] != n_cls_d[i] || n_cls_m[i] == 0) begin
        failures++; $display("FAIL class %0d: model %0d bank %0d", i, n_cls_m[i], n_cls_d[i]);
      end
    end
    checks++;
    if (n_lat15 == 0 || n_lat21 == 0 || n_skip == 0 || n_inh == 0 || n_forced == 0 || n_evict == 0 || n_ecc == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (n_bank[b] == 0) begin failures++; $display("FAIL bank %0d unused", b); end
    end
    $display("pred_unique=%0d pred_collision=%0d nopred_miss=%0d mispred=%0d overpred_miss=%0d",
             n_cls_d[0], n_cls_d[1], n_cls_d[2], n_cls_d[3], n_cls_d[4]);
    $display("reads in 15 cycles=%0d reads in 21 cycles=%0d", n_lat15, n_lat21);
    $display("pred_skipped=%0d inhibit_updates=%0d forced_accesses=%0d evictions=%0d ecc_corrected=%0d",
             n_skip, n_inh, n_forced, n_evict, n_ecc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
