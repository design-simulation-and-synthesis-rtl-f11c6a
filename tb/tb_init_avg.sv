// tb_init_avg: feeds random 4x4 blocks (with random idle cycles between
// pixels) into the average module and checks the average and its 5-bit
// quantization against sums computed here, plus the one-cycle latency.
module tb_init_avg;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, pix_valid = 0, pix_last = 0, out_valid;
  logic [7:0] pix = 0, avg;
  logic [4:0] avg_q;
  int checks = 0, failures = 0;

  init_avg dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 200; b++) begin
      int sum, lo, hi;
      sum = 0;
      lo = (b % 3 == 0) ? 200 : 0;
      hi = (b % 3 == 1) ? 60 : 256;
      for (int i = 0; i < 16; i++) begin
        int v;
        v = lo + int'($urandom % (hi - lo));
        if (b == 5) v = 255;
        sum += v;
        @(posedge clk);
        pix_valid <= 1; pix <= 8'(v); pix_last <= (i == 15);
        if (i != 15 && $urandom % 4 == 0) begin
          @(posedge clk);
          pix_valid <= 0;
        end
      end
      @(posedge clk);
      pix_valid <= 0; pix_last <= 0;
      @(negedge clk);
      checks++;
      if (!(out_valid && avg == 8'(sum / 16) && avg_q == 5'((sum / 16) / 8))) begin
        failures++;
        $display("FAIL block %0d: sum %0d avg %0d q %0d valid %0d", b, sum, avg, avg_q, out_valid);
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
