// tb_term2_comp: checks Term2 = K*(16K - 2T) over random and extreme K and T,
// and that Term1 + Term2 equals sum (r - d - K)^2 for random pixel blocks.
module tb_term2_comp;
  logic signed [9:0]  k;
  logic signed [16:0] t_diff;
  logic signed [23:0] i_fac, term2;
  int checks = 0, failures = 0;

  term2_comp dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int kk, tt;
      kk = int'($urandom % 512) - 256;
      tt = int'($urandom % 8161) - 4080;
      if (n == 0) begin kk = -256; tt = 4080; end
      if (n == 1) begin kk = 255; tt = -4080; end
      k = 10'(kk); t_diff = 17'(tt);
      #1;
      checks++;
      if (int'(i_fac) != 16*kk - 2*tt || int'(term2) != kk * (16*kk - 2*tt)) begin
        failures++;
        $display("FAIL k %0d t %0d: %0d %0d", kk, tt, i_fac, term2);
      end
    end
    // identity with the direct error
    for (int n = 0; n < 300; n++) begin
      int r[16], d[16], t1, t, direct, kk;
      t1 = 0; t = 0; direct = 0;
      kk = int'($urandom % 128) - 64;
      for (int i = 0; i < 16; i++) begin
        r[i] = int'($urandom % 256); d[i] = int'($urandom % 256);
        t1 += (r[i]-d[i])*(r[i]-d[i]); t += r[i]-d[i];
        direct += (r[i]-d[i]-kk)*(r[i]-d[i]-kk);
      end
      k = 10'(kk); t_diff = 17'(t);
      #1;
      checks++;
      if (t1 + int'(term2) != direct) begin failures++; $display("FAIL identity"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
