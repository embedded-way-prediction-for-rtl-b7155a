// tb_ptag_width: sensitivity of way-prediction accuracy to the partial tag
// width, on the tag-side logic that decides every prediction of a bank.
//
// Five copies of inhibit_ctrl, with partial tags of 2, 4, 6, 7 and 8 bits,
// each with its own copy of the tag state of 64 sets and the LRU update,
// see the same access trace: reads with temporal reuse over about 24 blocks
// per set (so sets overflow and blocks are evicted), and a fill after every
// read miss, as a cache does. The bench keeps the tags, valid bits and ages
// and applies each copy's new inhibit bits. For each width it reports the
// five outcome classes of every read.
// Checks: hits and misses are the same at every width (the width must not
// change what the cache holds); the fraction of hits read by a correct
// prediction grows from 2 to 7 bits and is at least 90% at 7 bits; no way is
// read for more misses at 8 bits than at 2; the inhibit invariant (at most
// one valid uninhibited block per partial tag and set) holds throughout.
module tb_ptag_width;
  import ewp_pkg::*;
  localparam int NW = 5;
  localparam int WIDTHS [NW] = '{2, 4, 6, 7, 8};
  localparam int NSET = 64;
  localparam int NBLK = 24;
  localparam int NACC = 20000;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cur_set;
  op_e cur_op;
  tag_t cur_tag;
  tag_t blocks [NSET][NBLK];
  int cls_cnt [NW][5];
  int hits [NW], misses [NW];
  logic hit_w [NW];

  initial begin
    #(NACC * 40 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int PW = WIDTHS[g];
    tag_set_t st [NSET];
    tag_set_t cur;
    way_t victim, unused_victim, hit_way, pred_way, fill_way;
    logic hit, pred_valid, pred_correct;
    wayvec_t pmatch, new_inh, valid;
    cls_e cls;
    logic [PW-1:0] fill_old_ptag;
    logic [NUM_WAYS-1:0][WAY_W-1:0] ages_v, ages_t;
    logic touch;
    way_t touch_way;

    assign cur = st[cur_set];
    always_comb for (int w = 0; w < NUM_WAYS; w++) valid[w] = cur.way[w].valid;
    assign touch = (cur_op == OP_FILL) || hit;
    assign touch_way = (cur_op == OP_FILL) ? fill_way : hit_way;
    assign hit_w[g] = hit;

    inhibit_ctrl #(.PW(PW)) u_ic (.set_in(cur), .op(cur_op), .tag(cur_tag), .victim(victim),
      .hit(hit), .hit_way(hit_way), .pmatch(pmatch), .pred_valid(pred_valid),
      .pred_way(pred_way), .pred_correct(pred_correct), .cls(cls), .fill_way(fill_way),
      .fill_old_ptag(fill_old_ptag), .new_inh(new_inh));
    lru_update u_v (.ages(cur.age), .valid(valid), .touch(1'b0), .touch_way('0),
      .new_ages(ages_v), .victim(victim));
    lru_update u_t (.ages(cur.age), .valid(valid), .touch(touch), .touch_way(touch_way),
      .new_ages(ages_t), .victim(unused_victim));

    initial begin
      for (int s = 0; s < NSET; s++) begin
        st[s] = '0;
        for (int w = 0; w < NUM_WAYS; w++) begin st[s].way[w].inh = 1'b1; st[s].age[w] = WAY_W'(w); end
      end
      for (int c = 0; c < 5; c++) cls_cnt[g][c] = 0;
      hits[g] = 0; misses[g] = 0;
    end

    tag_set_t nxt;
    always_comb begin
      nxt = cur;
      for (int w = 0; w < NUM_WAYS; w++) nxt.way[w].inh = new_inh[w];
      if (cur_op == OP_FILL) begin
        nxt.way[fill_way].tag = cur_tag;
        nxt.way[fill_way].valid = 1'b1;
      end
      nxt.age = ages_t;
    end

    always @(posedge clk) begin
      if (cur_op == OP_READ) begin
        cls_cnt[g][int'(cls)] <= cls_cnt[g][int'(cls)] + 1;
        if (hit) hits[g] <= hits[g] + 1; else misses[g] <= misses[g] + 1;
      end
      st[cur_set] <= nxt;
    end

    // invariant check on the set just updated
    always @(negedge clk) begin
      for (int a = 0; a < NUM_WAYS; a++)
        for (int b = a + 1; b < NUM_WAYS; b++)
          if (st[cur_set].way[a].valid && st[cur_set].way[b].valid &&
              !st[cur_set].way[a].inh && !st[cur_set].way[b].inh &&
              st[cur_set].way[a].tag[PW-1:0] == st[cur_set].way[b].tag[PW-1:0]) begin
            failures++;
            $display("FAIL width %0d: two uninhibited blocks share a partial tag", PW);
          end
    end
  end

  initial begin
    int acc [NW], flt [NW];
    for (int s = 0; s < NSET; s++)
      for (int k = 0; k < NBLK; k++) blocks[s][k] = $urandom;
    cur_set = 0; cur_op = OP_INVAL; cur_tag = '1;
    @(negedge clk);
    for (int a = 0; a < NACC; a++) begin
      int k;
      cur_set = $urandom_range(NSET - 1);
      // reuse bias: the lower block numbers are hot
      k = $urandom_range(NBLK - 1);
      if ($urandom_range(1) != 0) k = k / 3;
      cur_op = OP_READ;
      cur_tag = blocks[cur_set][k];
      #1;
      for (int g = 1; g < NW; g++) begin
        checks++;
        if (hit_w[g] !== hit_w[0]) begin failures++; $display("FAIL hit differs across widths"); end
      end
      @(negedge clk);
      if (!hit_w[0]) begin
        cur_op = OP_FILL;     // same set and tag
        @(negedge clk);
      end
    end
    cur_op = OP_INVAL; cur_tag = '1;
    @(negedge clk);
    for (int g = 0; g < NW; g++) begin
      acc[g] = (1000 * (cls_cnt[g][0] + cls_cnt[g][1])) / (hits[g] > 0 ? hits[g] : 1);
      flt[g] = (1000 * cls_cnt[g][2]) / (misses[g] > 0 ? misses[g] : 1);
      $display("width %0d: hits %0d (unique %0d, collision %0d, mispredict %0d) misses %0d (no way %0d, over-predict %0d): hit accuracy %0d.%0d%%, misses filtered %0d.%0d%%",
               WIDTHS[g], hits[g], cls_cnt[g][0], cls_cnt[g][1], cls_cnt[g][3], misses[g],
               cls_cnt[g][2], cls_cnt[g][4], acc[g] / 10, acc[g] % 10, flt[g] / 10, flt[g] % 10);
    end
    checks++;
    if (!(acc[0] < acc[1] && acc[1] < acc[3])) begin failures++; $display("FAIL accuracy does not grow with width"); end
    checks++;
    if (acc[3] < 900) begin failures++; $display("FAIL accuracy at 7 bits below 90%%"); end
    checks++;
    if (flt[4] <= flt[0]) begin failures++; $display("FAIL miss filtering does not grow with width"); end
    checks++;
    if (misses[0] == 0 || cls_cnt[0][1] == 0) begin failures++; $display("FAIL trace has no misses or collisions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
