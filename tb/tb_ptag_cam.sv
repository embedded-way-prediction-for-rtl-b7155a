// tb_ptag_cam: keeps a reference copy of every CAM entry, writes random
// partial tags and inhibit bits (separately and together) and after every
// write searches with random and stored keys, comparing all matchlines with
// the reference. Checks the reset state (tag 0, inhibited) first.
module tb_ptag_cam;
  localparam int N = 128, W = 7;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] cmp_ptag, wptag;
  logic cmp_inh, we_ptag, we_inh, winh;
  logic [N-1:0] wsel, match, expm;
  logic [W-1:0] ref_pt [N];
  logic         ref_inh [N];
  int checks = 0, failures = 0;

  ptag_cam #(.ENTRIES(N), .PTAG_W(W)) dut (.clk(clk), .rst_n(rst_n), .cmp_ptag(cmp_ptag),
    .cmp_inh(cmp_inh), .wsel(wsel), .we_ptag(we_ptag), .wptag(wptag), .we_inh(we_inh),
    .winh(winh), .match(match));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic search(input logic [W-1:0] p, input logic i);
    cmp_ptag = p; cmp_inh = i;
    #1;
    for (int e = 0; e < N; e++) expm[e] = (ref_pt[e] == p) && (ref_inh[e] == i);
    checks++;
    if (match !== expm) begin
      failures++;
      $display("FAIL search p=%h i=%0d", p, i);
    end
  endtask

  initial begin
    wsel = '0; we_ptag = 0; we_inh = 0; wptag = '0; winh = 0;
    for (int e = 0; e < N; e++) begin ref_pt[e] = '0; ref_inh[e] = 1'b1; end
    #12 rst_n = 1;
    search('0, 1'b1);   // every entry matches after reset
    search('0, 1'b0);
    for (int t = 0; t < 3000; t++) begin
      int e;
      @(negedge clk);
      e = $urandom_range(N - 1);
      wsel = '0; wsel[e] = 1'b1;
      we_ptag = $urandom_range(1); we_inh = $urandom_range(1);
      wptag = W'($urandom); winh = $urandom_range(1);
      @(posedge clk); #1;
      if (we_ptag) ref_pt[e] = wptag;
      if (we_inh)  ref_inh[e] = winh;
      wsel = '0; we_ptag = 0; we_inh = 0;
      search(ref_pt[e], 1'b0);
      search(W'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
