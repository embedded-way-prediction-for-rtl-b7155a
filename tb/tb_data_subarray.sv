// tb_data_subarray: writes random rows through one-hot wordlines, reads them
// back and checks data and the one-cycle rvalid; an access with no wordline
// (an inhibited way) must return rvalid=0 and zero data, and writes must not
// raise rvalid.
module tb_data_subarray;
  localparam int ROWS = 256, CW = 523;
  logic clk = 0, rst_n = 0;
  logic [ROWS-1:0] wl;
  logic we, rvalid;
  logic [CW-1:0] wdata, rdata;
  logic [CW-1:0] ref_mem [ROWS];
  logic          written [ROWS];
  int checks = 0, failures = 0;

  data_subarray #(.ROWS(ROWS), .CW(CW)) dut (.clk(clk), .rst_n(rst_n), .wl(wl), .we(we),
    .wdata(wdata), .rvalid(rvalid), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CW-1:0] rnd();
    logic [CW-1:0] v;
    for (int k = 0; k < CW; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    wl = '0; we = 0; wdata = '0;
    for (int r = 0; r < ROWS; r++) written[r] = 0;
    #12 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int r, kind;
      @(negedge clk);
      r = $urandom_range(ROWS - 1);
      kind = $urandom_range(2);
      wl = '0;
      if (kind != 2) wl[r] = 1'b1;
      we = (kind == 0);
      wdata = rnd();
      if (kind == 0) begin ref_mem[r] = wdata; written[r] = 1; end
      @(negedge clk);
      wl = '0; we = 0;
      checks++;
      if (kind == 1) begin
        if (!rvalid || (written[r] && rdata !== ref_mem[r])) begin
          failures++; $display("FAIL read row %0d", r);
        end
      end else if (rvalid || rdata != '0) begin
        failures++; $display("FAIL spurious rvalid kind=%0d", kind);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
