// inhibit_ctrl: the tag-side half of embedded way prediction.
//
// Given the contents of one set and the request, it works out everything the
// bank needs to keep the data-array CAMs consistent, without ever reading
// them:
//  * the full tag compare (hit, hit_way);
//  * the partial tag compare, reusing the low PW bits of the full
//    comparator (pmatch, valid ways only);
//  * which way the CAMs predicted: the way whose partial tag matches and whose
//    inhibit copy is clear (pred_valid, pred_way), and whether it was right;
//  * the outcome class used for accuracy counts;
//  * the new inhibit bits of the set (new_inh).
// Inhibit rules, keeping "only the most recently used block of each
// collision set is uninhibited":
//  * read or write: every valid way with the request's partial tag is
//    inhibited, then the hit way (if any) is uninhibited;
//  * fill into way v: if v held the uninhibited block of its old collision
//    set, the most recently used other block of that set is uninhibited;
//    then every way with the new partial tag is inhibited and v is cleared;
//  * invalidate of way h: h is inhibited; if it was the uninhibited one, the
//    most recently used other matching block is uninhibited.
// The rules follow the original design. Choosing the most recently used successor
// (the original allows any when LRU is only approximate) is this design's
// choice, possible because the ages are exact. Purely combinational.
module inhibit_ctrl
  import ewp_pkg::*;
#(
  parameter int unsigned PW = ewp_pkg::PTAG_W   // partial tag width
) (
  input  tag_set_t set_in,
  input  op_e      op,
  input  tag_t     tag,
  input  way_t     victim,      // replacement choice for a fill miss
  output logic     hit,
  output way_t     hit_way,
  output wayvec_t  pmatch,
  output logic     pred_valid,
  output way_t     pred_way,
  output logic     pred_correct,
  output cls_e     cls,
  output way_t     fill_way,    // way written by a fill
  output logic [PW-1:0] fill_old_ptag,
  output wayvec_t  new_inh
);
  wayvec_t valid, inh, hitv, predv;
  logic [PW-1:0] rptag;

  // Most recently used way among the candidates.
  function automatic logic [WAY_W:0] mru_of(input wayvec_t cand,
                                            input logic [NUM_WAYS-1:0][WAY_W-1:0] ages);
    logic          f;
    way_t          best;
    logic [WAY_W-1:0] best_age;
    f = 1'b0; best = '0; best_age = '1;
    for (int i = 0; i < NUM_WAYS; i++) begin
      if (cand[i] && (!f || ages[i] < best_age)) begin
        f = 1'b1; best = way_t'(i); best_age = ages[i];
      end
    end
    return {f, best};
  endfunction

  always_comb begin
    int unsigned nm;
    logic [WAY_W:0] succ;
    logic [PW-1:0] old_pt;
    wayvec_t cand;

    rptag  = tag[PW-1:0];
    cand   = '0;
    succ   = '0;
    old_pt = '0;
    for (int w = 0; w < NUM_WAYS; w++) begin
      valid[w]  = set_in.way[w].valid;
      inh[w]    = set_in.way[w].inh;
      hitv[w]   = valid[w] && (set_in.way[w].tag == tag);
      pmatch[w] = valid[w] && (set_in.way[w].tag[PW-1:0] == rptag);
      // Exactly what the CAM reports: partial tag equal and inhibit clear.
      predv[w]  = (set_in.way[w].tag[PW-1:0] == rptag) && !inh[w];
    end

    hit = |hitv;
    hit_way = '0;
    for (int w = NUM_WAYS - 1; w >= 0; w--) if (hitv[w]) hit_way = way_t'(w);
    pred_valid = |predv;
    pred_way = '0;
    for (int w = NUM_WAYS - 1; w >= 0; w--) if (predv[w]) pred_way = way_t'(w);
    pred_correct = hit && pred_valid && (pred_way == hit_way);

    nm = 0;
    for (int w = 0; w < NUM_WAYS; w++) nm += int'(pmatch[w]);
    if (hit) cls = pred_correct ? ((nm > 1) ? CLS_PRED_COLLISION : CLS_PRED_UNIQUE) : CLS_MISPRED;
    else     cls = pred_valid ? CLS_OVERPRED_MISS : CLS_NOPRED_MISS;

    fill_way      = hit ? hit_way : victim;
    fill_old_ptag = set_in.way[fill_way].tag[PW-1:0];
    new_inh       = inh;
    unique case (op)
      OP_READ, OP_WRITE: begin
        new_inh = inh | pmatch;
        if (hit) new_inh[hit_way] = 1'b0;
      end
      OP_FILL: begin
        if (!hit && valid[fill_way] && !inh[fill_way]) begin
          old_pt = fill_old_ptag;
          for (int w = 0; w < NUM_WAYS; w++)
            cand[w] = valid[w] && (w != int'(fill_way)) &&
                      (set_in.way[w].tag[PW-1:0] == old_pt);
          succ = mru_of(cand, set_in.age);
          if (succ[WAY_W]) new_inh[succ[WAY_W-1:0]] = 1'b0;
        end
        for (int w = 0; w < NUM_WAYS; w++)
          if (pmatch[w] && w != int'(fill_way)) new_inh[w] = 1'b1;
        new_inh[fill_way] = 1'b0;
      end
      OP_INVAL: begin
        if (hit) begin
          new_inh[hit_way] = 1'b1;
          if (!inh[hit_way]) begin
            cand = pmatch;
            cand[hit_way] = 1'b0;
            succ = mru_of(cand, set_in.age);
            if (succ[WAY_W]) new_inh[succ[WAY_W-1:0]] = 1'b0;
          end
        end
      end
      default: ;
    endcase
  end
endmodule
