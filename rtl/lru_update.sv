// lru_update: true-LRU bookkeeping for one set.
//
// Each way has an age from 0 (most recently used) to NUM_WAYS-1 (least);
// the ages of a set are always a permutation. Touching a way gives it age 0
// and ages by one every way that was younger than it. The victim for a fill
// is the lowest-numbered invalid way, or else the way of the highest age.
// The original design uses LRU both for replacement and to pick which block of a
// collision set stays uninhibited; the age-counter form is this design's
// choice. Purely combinational.
module lru_update
  import ewp_pkg::*;
(
  input  logic [NUM_WAYS-1:0][WAY_W-1:0] ages,
  input  wayvec_t                        valid,
  input  logic                           touch,
  input  way_t                           touch_way,
  output logic [NUM_WAYS-1:0][WAY_W-1:0] new_ages,
  output way_t                           victim
);
  always_comb begin
    logic found;
    new_ages = ages;
    if (touch) begin
      for (int w = 0; w < NUM_WAYS; w++) begin
        if (w == int'(touch_way))           new_ages[w] = '0;
        else if (ages[w] < ages[touch_way]) new_ages[w] = ages[w] + 1'b1;
      end
    end
    victim = '0;
    found  = 1'b0;
    for (int w = 0; w < NUM_WAYS; w++) begin
      if (!valid[w] && !found) begin
        victim = way_t'(w);
        found  = 1'b1;
      end
    end
    if (!found) begin
      for (int w = 0; w < NUM_WAYS; w++)
        if (ages[w] == WAY_W'(NUM_WAYS - 1)) victim = way_t'(w);
    end
  end
endmodule
