// tb_range_access: writes random range blocks in a random index order
// (index 0 first, as the encoder does), then checks the running sum and every
// stored pixel read back through rd_idx.
module tb_range_access;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, wr_en = 0;
  logic [7:0] wr_idx = 0, wr_pix = 0, rd_idx = 0, r_pix;
  logic [15:0] sum_r;
  int checks = 0, failures = 0;
  int ref_r[16];

  range_access dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int blk = 0; blk < 50; blk++) begin
      int sum;
      sum = 0;
      for (int i = 0; i < 16; i++) begin
        ref_r[i] = (blk == 3) ? 255 : int'($urandom % 256);
        sum += ref_r[i];
        @(posedge clk);
        wr_en <= 1; wr_idx <= 8'(i); wr_pix <= 8'(ref_r[i]);
      end
      @(posedge clk);
      wr_en <= 0;
      @(negedge clk);
      checks++;
      if (sum_r != 16'(sum)) begin failures++; $display("FAIL sum %0d vs %0d", sum_r, sum); end
      for (int i = 0; i < 16; i++) begin
        rd_idx = 8'(15 - i);
        #1;
        checks++;
        if (r_pix != 8'(ref_r[15-i])) begin failures++; $display("FAIL pix %0d", 15-i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
