// tb_data_mat: drives a data mat with random operations on a few sets and a
// small partial-tag space, and keeps a reference copy of every CAM entry and
// data row of both ways. For each operation the model decides which way's
// wordline fires (row decoded and CAM partial tag and inhibit equal to the
// comparison lines), applies writes and CAM updates, and checks rvalid, rway
// and the read data one cycle later. Covers both halves of the set range
// (both sub-arrays of a way) and even and odd rows (top and bottom CAMs).
module tb_data_mat;
  import ewp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, wr, rvalid;
  set_idx_t set;
  ptag_t ptag, cam_ptag;
  logic [1:0] inh_cmp, cam_we_ptag, cam_we_inh, cam_inh, rway;
  cw_t wdata, rdata;
  ptag_t m_pt [2][NUM_SETS];
  logic  m_inh [2][NUM_SETS];
  cw_t   m_data [2][NUM_SETS];
  logic  m_wr [2][NUM_SETS];
  int checks = 0, failures = 0, n_read = 0, n_silent = 0;

  data_mat dut (.clk(clk), .rst_n(rst_n), .en(en), .set(set), .ptag(ptag), .inh_cmp(inh_cmp),
    .wr(wr), .wdata(wdata), .cam_we_ptag(cam_we_ptag), .cam_ptag(cam_ptag),
    .cam_we_inh(cam_we_inh), .cam_inh(cam_inh), .rvalid(rvalid), .rdata(rdata), .rway(rway));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_idx_t sets [6];
    sets = '{9'd0, 9'd1, 9'd77, 9'd256, 9'd257, 9'd511};
    for (int l = 0; l < 2; l++)
      for (int s = 0; s < NUM_SETS; s++) begin
        m_pt[l][s] = '0; m_inh[l][s] = 1'b1; m_wr[l][s] = 1'b0;
      end
    en = 0; wr = 0; set = '0; ptag = '0; inh_cmp = '0; wdata = '0;
    cam_we_ptag = '0; cam_ptag = '0; cam_we_inh = '0; cam_inh = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      logic [1:0] fire;
      logic e_rv;
      cw_t e_rd;
      @(negedge clk);
      en = 1'b1;
      set = sets[$urandom_range(5)];
      ptag = ptag_t'($urandom_range(2));
      inh_cmp = 2'($urandom);
      wr = ($urandom_range(2) == 0);
      for (int k = 0; k < CW_W; k += 32) wdata[k +: 32] = $urandom;
      cam_we_ptag = 2'($urandom);
      cam_ptag = ptag_t'($urandom_range(2));
      cam_we_inh = 2'($urandom);
      cam_inh = 2'($urandom);
      for (int l = 0; l < 2; l++)
        fire[l] = (m_pt[l][set] == ptag) && (m_inh[l][set] == inh_cmp[l]);
      // only one way may fire in a real access; keep reads single-way
      if (!wr && fire == 2'b11) begin inh_cmp[1] = ~inh_cmp[1]; fire[1] = 1'b0; end
      e_rv = !wr && (fire != 0);
      e_rd = '0;
      for (int l = 0; l < 2; l++) if (!wr && fire[l] && m_wr[l][set]) e_rd = m_data[l][set];
      @(posedge clk);
      for (int l = 0; l < 2; l++) begin
        if (wr && fire[l]) begin m_data[l][set] = wdata; m_wr[l][set] = 1'b1; end
        if (cam_we_ptag[l]) m_pt[l][set] = cam_ptag;
        if (cam_we_inh[l])  m_inh[l][set] = cam_inh[l];
      end
      @(negedge clk);
      en = 0; wr = 0; cam_we_ptag = '0; cam_we_inh = '0;
      checks++;
      if (rvalid !== e_rv || (e_rv && rway !== fire) ||
          (e_rv && m_wr[fire[1]][set] && rdata !== e_rd)) begin
        failures++; $display("FAIL t=%0d set=%0d fire=%b rv=%0d/%0d", t, set, fire, rvalid, e_rv);
      end
      if (e_rv) n_read++;
      else if (!wr) n_silent++;
    end
    checks++;
    if (n_read < 50 || n_silent < 50) begin failures++; $display("FAIL coverage %0d %0d", n_read, n_silent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
