// tb_htree: issues random operations and models the eight mats: one cycle
// after an operation reaches them, mat m answers with the operation's write
// data if its bit in a one-hot "responder" field (the low inhibit lines of
// each mat) is set. Checks that every operation reaches the mats REQ_STAGES
// cycles after issue and comes back with its own metadata, data and way
// exactly 15 cycles after issue.
module tb_htree;
  import ewp_pkg::*;
  logic clk = 0, rst_n = 0;
  dp_op_t in_op, mat_op;
  dp_meta_t in_meta, out_meta;
  logic [NUM_MATS-1:0] mat_rvalid;
  cw_t mat_rdata [NUM_MATS];
  logic [NUM_MATS-1:0][1:0] mat_rway;
  logic out_valid, out_rvalid, out_multi;
  cw_t out_rdata;
  way_t out_rway;
  int checks = 0, failures = 0, cyc = 0;
  dp_op_t   hist_op   [int];
  dp_meta_t hist_meta [int];
  int issued = 0, seen = 0;

  htree dut (.clk(clk), .rst_n(rst_n), .in_op(in_op), .in_meta(in_meta), .mat_op(mat_op),
    .mat_rvalid(mat_rvalid), .mat_rdata(mat_rdata), .mat_rway(mat_rway), .out_valid(out_valid),
    .out_meta(out_meta), .out_rvalid(out_rvalid), .out_rdata(out_rdata), .out_rway(out_rway),
    .out_multi(out_multi));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mat model
  always_ff @(posedge clk) begin
    for (int m = 0; m < NUM_MATS; m++) begin
      mat_rvalid[m] <= mat_op.en && mat_op.inh_cmp[2*m];
      mat_rdata[m]  <= (mat_op.en && mat_op.inh_cmp[2*m]) ? mat_op.wdata : '0;
      mat_rway[m]   <= {mat_op.inh_cmp[2*m+1], ~mat_op.inh_cmp[2*m+1]};
    end
  end

  // issue side
  initial begin
    in_op = '0; in_meta = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_op = '0; in_meta = '0;
      if ($urandom_range(3) != 0) begin
        int m;
        in_op.en = 1'b1;
        in_op.set = set_idx_t'($urandom);
        m = $urandom_range(NUM_MATS);     // NUM_MATS means nobody answers
        if (m < NUM_MATS) in_op.inh_cmp[2*m] = 1'b1;
        in_op.inh_cmp[2*(m % NUM_MATS)+1] = 1'($urandom);
        begin
          logic [CW_W+31:0] r;
          for (int k = 0; k < CW_W; k += 32) r[k +: 32] = $urandom;
          in_op.wdata = r[CW_W-1:0];
        end
        in_meta.id = 8'($urandom);
        in_meta.kind = dkind_e'($urandom_range(3));
        in_meta.tag = $urandom;
        hist_op[cyc] = in_op;
        hist_meta[cyc] = in_meta;
        issued++;
      end
    end
    @(negedge clk);
    in_op = '0;
    repeat (30) @(posedge clk);
    checks++;
    if (seen != issued) begin failures++; $display("FAIL seen %0d of %0d", seen, issued); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check side
  always @(negedge clk) begin
    if (rst_n && mat_op.en) begin
      checks++;
      if (!hist_op.exists(cyc - 7) || hist_op[cyc - 7] !== mat_op) begin
        failures++; $display("FAIL op not at mats 7 cycles after issue (cyc %0d)", cyc);
      end
    end
    if (rst_n && out_valid) begin
      int ic, m, found;
      dp_op_t o;
      ic = cyc - 15;
      checks++;
      seen++;
      if (!hist_meta.exists(ic) || hist_meta[ic] !== out_meta) begin
        failures++; $display("FAIL meta at cyc %0d", cyc);
      end else begin
        o = hist_op[ic];
        found = 0; m = 0;
        for (int k = 0; k < NUM_MATS; k++) if (o.inh_cmp[2*k]) begin found = 1; m = k; end
        if (out_rvalid !== 1'(found) || (found && (out_rdata !== o.wdata ||
            out_rway !== way_t'(2*m + int'(o.inh_cmp[2*m+1])))) || out_multi) begin
          failures++; $display("FAIL data at cyc %0d rv=%0d found=%0d rway=%0d m=%0d multi=%0d", cyc, out_rvalid, found, out_rway, m, out_multi);
        end
      end
    end
  end
endmodule
