// tb_inhibit_ctrl: random sets with few distinct partial tags, so that
// collisions are common, and random requests of every operation. An
// independent model works out the hit, the CAM's prediction, the outcome
// class and the new inhibit bits, and all are compared with the module.
// Counts how often each outcome class and each successor case occurred.
module tb_inhibit_ctrl;
  import ewp_pkg::*;
  tag_set_t set_in;
  op_e  op;
  tag_t tag;
  way_t victim, hit_way, pred_way, fill_way;
  logic hit, pred_valid, pred_correct;
  wayvec_t pmatch, new_inh;
  cls_e cls;
  ptag_t fill_old_ptag;
  int checks = 0, failures = 0;
  int n_cls [5];
  int n_succ = 0;

  inhibit_ctrl dut (.set_in(set_in), .op(op), .tag(tag), .victim(victim), .hit(hit),
    .hit_way(hit_way), .pmatch(pmatch), .pred_valid(pred_valid), .pred_way(pred_way),
    .pred_correct(pred_correct), .cls(cls), .fill_way(fill_way),
    .fill_old_ptag(fill_old_ptag), .new_inh(new_inh));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tag_t mk_tag();
    return tag_t'(($urandom_range(3) << PTAG_W) | $urandom_range(2));
  endfunction

  initial begin
    for (int i = 0; i < 5; i++) n_cls[i] = 0;
    for (int t = 0; t < 20000; t++) begin
      int h, p, np, fw, best, bage;
      logic e_hit, e_pv;
      logic [NUM_WAYS-1:0] e_inh;
      cls_e e_cls;
      // random set: ages a permutation, tags from a small space
      for (int w = 0; w < NUM_WAYS; w++) begin
        set_in.way[w].tag   = mk_tag();
        set_in.way[w].valid = $urandom_range(4) != 0;
        set_in.way[w].dirty = $urandom_range(1);
        set_in.way[w].inh   = set_in.way[w].valid ? 1'($urandom_range(1)) : 1'b1;
        set_in.age[w] = WAY_W'(w);
      end
      for (int w = NUM_WAYS - 1; w > 0; w--) begin
        int j; logic [WAY_W-1:0] tmp;
        j = $urandom_range(w);
        tmp = set_in.age[w]; set_in.age[w] = set_in.age[j]; set_in.age[j] = tmp;
      end
      // make tags unique among valid ways (a cache never holds a block twice)
      for (int w = 0; w < NUM_WAYS; w++)
        for (int v = 0; v < w; v++)
          if (set_in.way[v].valid && set_in.way[w].tag == set_in.way[v].tag)
            set_in.way[w].valid = 1'b0;
      for (int w = 0; w < NUM_WAYS; w++) if (!set_in.way[w].valid) set_in.way[w].inh = 1'b1;
      op = op_e'($urandom_range(3));
      tag = mk_tag();
      victim = way_t'($urandom);
      #1;
      // model
      h = -1; p = -1; np = 0;
      for (int w = 0; w < NUM_WAYS; w++) begin
        if (set_in.way[w].valid && set_in.way[w].tag == tag) h = w;
        if (set_in.way[w].tag[PTAG_W-1:0] == tag[PTAG_W-1:0] && !set_in.way[w].inh && p < 0) p = w;
        if (set_in.way[w].valid && set_in.way[w].tag[PTAG_W-1:0] == tag[PTAG_W-1:0]) np++;
      end
      e_hit = (h >= 0);
      e_pv  = (p >= 0);
      if (e_hit) e_cls = (p == h) ? ((np > 1) ? CLS_PRED_COLLISION : CLS_PRED_UNIQUE) : CLS_MISPRED;
      else       e_cls = e_pv ? CLS_OVERPRED_MISS : CLS_NOPRED_MISS;
      for (int w = 0; w < NUM_WAYS; w++) e_inh[w] = set_in.way[w].inh;
      fw = e_hit ? h : int'(victim);
      case (op)
        OP_READ, OP_WRITE: begin
          for (int w = 0; w < NUM_WAYS; w++)
            if (set_in.way[w].valid && set_in.way[w].tag[PTAG_W-1:0] == tag[PTAG_W-1:0]) e_inh[w] = 1;
          if (e_hit) e_inh[h] = 0;
        end
        OP_FILL: begin
          if (!e_hit && set_in.way[fw].valid && !set_in.way[fw].inh) begin
            best = -1; bage = 99;
            for (int w = 0; w < NUM_WAYS; w++)
              if (w != fw && set_in.way[w].valid &&
                  set_in.way[w].tag[PTAG_W-1:0] == set_in.way[fw].tag[PTAG_W-1:0] &&
                  int'(set_in.age[w]) < bage) begin best = w; bage = set_in.age[w]; end
            if (best >= 0) begin e_inh[best] = 0; n_succ++; end
          end
          for (int w = 0; w < NUM_WAYS; w++)
            if (w != fw && set_in.way[w].valid && set_in.way[w].tag[PTAG_W-1:0] == tag[PTAG_W-1:0])
              e_inh[w] = 1;
          e_inh[fw] = 0;
        end
        default: begin
          if (e_hit) begin
            e_inh[h] = 1;
            if (!set_in.way[h].inh) begin
              best = -1; bage = 99;
              for (int w = 0; w < NUM_WAYS; w++)
                if (w != h && set_in.way[w].valid &&
                    set_in.way[w].tag[PTAG_W-1:0] == tag[PTAG_W-1:0] &&
                    int'(set_in.age[w]) < bage) begin best = w; bage = set_in.age[w]; end
              if (best >= 0) begin e_inh[best] = 0; n_succ++; end
            end
          end
        end
      endcase
      checks++;
      if (hit !== e_hit || (e_hit && hit_way !== way_t'(h)) || pred_valid !== e_pv ||
          (e_pv && pred_way !== way_t'(p)) || pred_correct !== (e_hit && p == h) ||
          cls !== e_cls || new_inh !== e_inh || (op == OP_FILL && fill_way !== way_t'(fw))) begin
        failures++;
        $display("FAIL t=%0d op=%0d hit=%0d/%0d pv=%0d/%0d cls=%0d/%0d inh=%h/%h", t, op, hit, e_hit,
                 pred_valid, e_pv, cls, e_cls, new_inh, e_inh);
      end
      if (op == OP_READ) n_cls[int'(e_cls)]++;
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_cls[i] == 0) begin failures++; $display("FAIL class %0d never seen", i); end
    end
    checks++;
    if (n_succ == 0) begin failures++; $display("FAIL no successor case"); end
    $display("classes %0d %0d %0d %0d %0d successors %0d", n_cls[0], n_cls[1], n_cls[2], n_cls[3], n_cls[4], n_succ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
