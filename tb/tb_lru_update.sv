// tb_lru_update: keeps a reference recency list for one set (most recent
// first), touches random ways and checks that the module's new ages equal
// each way's position in the list and that the victim is the first invalid
// way, or else the last way in the list.
module tb_lru_update;
  import ewp_pkg::*;
  logic [NUM_WAYS-1:0][WAY_W-1:0] ages, new_ages;
  wayvec_t valid;
  logic touch;
  way_t touch_way, victim;
  int order [NUM_WAYS];
  int checks = 0, failures = 0;

  lru_update dut (.ages(ages), .valid(valid), .touch(touch), .touch_way(touch_way),
                  .new_ages(new_ages), .victim(victim));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_WAYS; i++) begin order[i] = i; ages[i] = WAY_W'(i); end
    for (int t = 0; t < 3000; t++) begin
      int w, pos, exp_v;
      w = $urandom_range(NUM_WAYS - 1);
      touch = $urandom_range(3) != 0;
      touch_way = way_t'(w);
      valid = (t % 4 == 0) ? wayvec_t'($urandom) : '1;
      #1;
      exp_v = order[NUM_WAYS-1];
      for (int i = NUM_WAYS - 1; i >= 0; i--) if (!valid[i]) exp_v = i;
      checks++;
      if (victim !== way_t'(exp_v)) begin failures++; $display("FAIL victim %0d exp %0d", victim, exp_v); end
      if (touch) begin
        pos = 0;
        for (int i = 0; i < NUM_WAYS; i++) if (order[i] == w) pos = i;
        for (int i = pos; i > 0; i--) order[i] = order[i-1];
        order[0] = w;
      end
      checks++;
      for (int i = 0; i < NUM_WAYS; i++)
        if (new_ages[order[i]] !== WAY_W'(i)) begin
          failures++; $display("FAIL age of way %0d", order[i]); break;
        end
      ages = new_ages;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
