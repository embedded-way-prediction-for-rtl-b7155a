// tb_tag_array: writes random set words to random sets and reads sets back
// against a reference copy.
module tb_tag_array;
  import ewp_pkg::*;
  logic clk = 0;
  set_idx_t rd_set, wr_set;
  tag_set_t rd_data, wr_data;
  logic we;
  tag_set_t ref_mem [NUM_SETS];
  logic     written [NUM_SETS];
  int checks = 0, failures = 0;

  tag_array dut (.clk(clk), .rd_set(rd_set), .rd_data(rd_data), .we(we), .wr_set(wr_set),
                 .wr_data(wr_data));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rd_set = '0; wr_set = '0; wr_data = '0;
    for (int s = 0; s < NUM_SETS; s++) written[s] = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      wr_set = set_idx_t'($urandom);
      for (int k = 0; k < $bits(tag_set_t); k += 32) wr_data[k +: 32] = $urandom;
      we = $urandom_range(1);
      rd_set = (t % 2) ? wr_set : set_idx_t'($urandom);
      #1;
      if (written[rd_set]) begin
        checks++;
        if (rd_data !== ref_mem[rd_set]) begin failures++; $display("FAIL set %0d", rd_set); end
      end
      @(posedge clk); #1;
      if (we) begin ref_mem[wr_set] = wr_data; written[wr_set] = 1; end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
