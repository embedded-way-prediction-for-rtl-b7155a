// data_mat: one data mat, a two-by-two square of sub-arrays that share a
// predecoder, with the CAMs that embed way prediction in the wordline path.
//
// The mat holds two ways (local way 0 and 1). Each way is spread over two
// 256-row sub-arrays: set bit 8 chooses the sub-array, bits 7:0 the row.
// Every sub-array has its own final decoder and two 128-entry partial-tag
// CAMs placed side by side: the top CAM holds the entries of even rows, the
// bottom CAM those of odd rows. On an access all CAMs compare in parallel
// with the predecoder and wordline decoders; a wordline fires only where its
// row is decoded and its CAM entry matches the comparison lines.
// Inputs per access: the set, the broadcast partial tag, one inhibit
// comparison line per way, an optional data write and optional CAM entry
// writes (partial tag and/or inhibit, per way). CAM writes land at the clock
// edge, after the compare. Read data appears one cycle after en with rvalid
// set if some wordline fired; rway tells which local way it came from.
// The even/odd CAM split and the use of set bit 8 are this design's reading
// of the mat organisation; the rest follows the original
// embedded way prediction design.
module data_mat
  import ewp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  set_idx_t    set,
  input  ptag_t       ptag,
  input  logic [1:0]  inh_cmp,
  input  logic        wr,
  input  cw_t         wdata,
  input  logic [1:0]  cam_we_ptag,
  input  ptag_t       cam_ptag,
  input  logic [1:0]  cam_we_inh,
  input  logic [1:0]  cam_inh,
  output logic        rvalid,
  output cw_t         rdata,
  output logic [1:0]  rway
);
  logic [15:0] pd_lo, pd_hi;
  logic [1:0]  sa_sel;
  logic [3:0]  sa_rvalid;
  cw_t         sa_rdata [4];

  mat_predecoder u_predec (
    .en    (en),
    .idx   (set),
    .pd_lo (pd_lo),
    .pd_hi (pd_hi),
    .sa_sel(sa_sel)
  );

  for (genvar s = 0; s < 4; s++) begin : g_sa
    localparam int unsigned LW   = s / 2;   // local way
    localparam int unsigned HALF = s % 2;   // which half of the sets
    logic [SA_ROWS-1:0]  match, row_sel, wl;
    logic [CAM_ROWS-1:0] m_top, m_bot, ws_top, ws_bot;

    for (genvar i = 0; i < CAM_ROWS; i++) begin : g_map
      assign match[2*i]   = m_top[i];
      assign match[2*i+1] = m_bot[i];
      assign ws_top[i]    = row_sel[2*i];
      assign ws_bot[i]    = row_sel[2*i+1];
    end

    ptag_cam #(.ENTRIES(CAM_ROWS), .PTAG_W(PTAG_W)) u_cam_top (
      .clk     (clk),
      .rst_n   (rst_n),
      .cmp_ptag(ptag),
      .cmp_inh (inh_cmp[LW]),
      .wsel    (ws_top),
      .we_ptag (cam_we_ptag[LW]),
      .wptag   (cam_ptag),
      .we_inh  (cam_we_inh[LW]),
      .winh    (cam_inh[LW]),
      .match   (m_top)
    );

    ptag_cam #(.ENTRIES(CAM_ROWS), .PTAG_W(PTAG_W)) u_cam_bot (
      .clk     (clk),
      .rst_n   (rst_n),
      .cmp_ptag(ptag),
      .cmp_inh (inh_cmp[LW]),
      .wsel    (ws_bot),
      .we_ptag (cam_we_ptag[LW]),
      .wptag   (cam_ptag),
      .we_inh  (cam_we_inh[LW]),
      .winh    (cam_inh[LW]),
      .match   (m_bot)
    );

    wl_decoder #(.ROWS(SA_ROWS)) u_wldec (
      .pd_lo  (pd_lo),
      .pd_hi  (pd_hi),
      .sel    (sa_sel[HALF]),
      .match  (match),
      .row_sel(row_sel),
      .wl     (wl)
    );

    data_subarray #(.ROWS(SA_ROWS), .CW(CW_W)) u_sram (
      .clk   (clk),
      .rst_n (rst_n),
      .wl    (wl),
      .we    (wr),
      .wdata (wdata),
      .rvalid(sa_rvalid[s]),
      .rdata (sa_rdata[s])
    );
  end

  always_comb begin
    rvalid = |sa_rvalid;
    rdata  = '0;
    for (int s = 0; s < 4; s++) rdata = rdata | sa_rdata[s];
    rway = {|sa_rvalid[3:2], |sa_rvalid[1:0]};
  end
endmodule
