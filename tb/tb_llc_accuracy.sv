// tb_llc_accuracy: prediction accuracy of one bank at the default 7-bit
// partial tag with realistic, random 32-bit tags.
//
// Phase 1 fills 64 sets completely (16 ways each, no evictions) with blocks
// whose tags are random. Phase 2 issues reads spaced so that every read finds
// the data pipeline free: 85% go to resident blocks, chosen with a bias
// towards recently read ones (temporal reuse), and 15% to absent tags. Every
// read must return the stored block, or a miss answer for absent tags.
// From the bank's event pulses the bench measures the fraction of hits read
// by a correct prediction, and the fraction of misses for which no way was
// read. Both are expected above 90% and 80%: with 7 partial-tag bits among
// 16 ways, collisions are uncommon, and the inhibit bits resolve most of them.
module tb_llc_accuracy;
  import ewp_pkg::*;
  localparam int NSET = 64;
  localparam int NREAD = 3000;

  logic clk = 0, rst_n = 0;
  int   cyc = 0;
  logic req_valid, req_ready;
  op_e  req_op;
  tag_t req_tag;
  set_idx_t req_set;
  block_t req_wdata;
  logic [ID_W-1:0] req_id;
  logic dv, derr, tv, tdirty;
  dresp_e dk;
  logic [ID_W-1:0] did, tid;
  block_t dd;
  tag_t dtag, ttag;
  set_idx_t dset;
  tresp_e tk;
  bank_stats_t st;

  llc_bank dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready), .req_op(req_op),
    .req_tag(req_tag), .req_set(req_set), .req_wdata(req_wdata), .req_id(req_id),
    .dresp_valid(dv), .dresp_kind(dk), .dresp_id(did), .dresp_data(dd), .dresp_tag(dtag),
    .dresp_set(dset), .dresp_ecc_err(derr), .tresp_valid(tv), .tresp_kind(tk), .tresp_id(tid),
    .tresp_dirty(tdirty), .tresp_tag(ttag), .stats(st));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  tag_t   tags [NSET][NUM_WAYS];
  block_t data [NSET][NUM_WAYS];
  int n_hit_ok = 0, n_hit = 0, n_miss_clean = 0, n_miss = 0, n_15 = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (st.pred_unique || st.pred_collision) n_hit_ok++;
    if (st.pred_unique || st.pred_collision || st.mispred) n_hit++;
    if (st.nopred_miss) n_miss_clean++;
    if (st.nopred_miss || st.overpred_miss) n_miss++;
  end

  task automatic issue(op_e op, set_idx_t s, tag_t t, block_t d, int id, output int ta);
    @(negedge clk);
    req_valid = 1; req_op = op; req_set = s; req_tag = t; req_wdata = d; req_id = ID_W'(id);
    forever begin
      #4;
      if (req_ready) break;
      @(negedge clk);
    end
    ta = cyc;
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  // Waits for the answer to one read and checks it; returns its latency.
  task automatic expect_read(int s, int w, int id, int t0, output int lat);
    lat = -1;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      if (dv && did == ID_W'(id)) begin
        lat = cyc - t0;
        checks++;
        if (w < 0 || dd !== data[s][w] || dk != DR_READ) begin
          failures++; $display("FAIL read set %0d way %0d", s, w);
        end
        break;
      end
      if (tv && tid == ID_W'(id)) begin
        lat = cyc - t0;
        checks++;
        if (w >= 0 || tk != TR_READ_MISS) begin failures++; $display("FAIL miss answer set %0d", s); end
        break;
      end
    end
    if (lat < 0) begin failures++; $display("FAIL no answer id %0d", id); end
  endtask

  initial begin
    int id, lat;
    int recent [$];
    req_valid = 0; req_op = OP_READ; req_tag = '0; req_set = '0; req_wdata = '0; req_id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    id = 0;
    // phase 1: fill
    for (int s = 0; s < NSET; s++)
      for (int w = 0; w < NUM_WAYS; w++) begin
        logic dup;
        do begin
          tags[s][w] = $urandom;
          dup = 0;
          for (int v = 0; v < w; v++) if (tags[s][v] == tags[s][w]) dup = 1;
        end while (dup);
        for (int k = 0; k < DATA_W; k += 32) data[s][w][k +: 32] = $urandom;
        issue(OP_FILL, set_idx_t'(s * 8), tags[s][w], data[s][w], id, lat);
        id = (id + 1) % 256;
      end
    repeat (30) @(posedge clk);
    n_hit_ok = 0; n_hit = 0; n_miss_clean = 0; n_miss = 0;
    // phase 2: reads
    for (int r = 0; r < NREAD; r++) begin
      int s, w, t0, key;
      tag_t t;
      if ($urandom_range(99) < 15) begin
        s = $urandom_range(NSET - 1); w = -1;
        t = $urandom;
        for (int v = 0; v < NUM_WAYS; v++) if (tags[s][v] == t) w = v;
      end else if (recent.size() > 8 && $urandom_range(1) == 0) begin
        key = recent[$urandom_range(recent.size() - 1)];
        s = key / NUM_WAYS; w = key % NUM_WAYS; t = tags[s][w];
      end else begin
        s = $urandom_range(NSET - 1); w = $urandom_range(NUM_WAYS - 1); t = tags[s][w];
      end
      if (w >= 0) begin
        recent.push_back(s * NUM_WAYS + w);
        if (recent.size() > 64) void'(recent.pop_front());
      end
      issue(OP_READ, set_idx_t'(s * 8), t, '0, id, t0);
      expect_read(s, w, id, t0, lat);
      if (w >= 0 && lat == 15) n_15++;
      checks++;
      if (w >= 0 && lat != 15 && lat != 21) begin failures++; $display("FAIL read latency %0d", lat); end
      id = (id + 1) % 256;
      repeat (2) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    $display("hits %0d, read by a correct prediction %0d (%0d%%); misses %0d, no way read %0d (%0d%%)",
             n_hit, n_hit_ok, (100 * n_hit_ok) / (n_hit > 0 ? n_hit : 1),
             n_miss, n_miss_clean, (100 * n_miss_clean) / (n_miss > 0 ? n_miss : 1));
    checks++;
    if (n_hit == 0 || n_hit_ok * 10 < n_hit * 9) begin failures++; $display("FAIL hit accuracy below 90%%"); end
    checks++;
    if (n_miss == 0 || n_miss_clean * 10 < n_miss * 8) begin failures++; $display("FAIL miss filtering below 80%%"); end
    checks++;
    if (n_15 != n_hit_ok) begin failures++; $display("FAIL %0d fast reads, %0d correct predictions", n_15, n_hit_ok); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
