// tb_postcoder: sends random codes (11-bit mapping number, 7-bit K_d) with
// random gaps of at least three cycles, then finish, and checks the byte
// stream against bits packed MSB first here, with zero padding; checks done
// and that restart allows a second image.
module tb_postcoder;
  import fic_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, code_valid = 0, finish = 0, restart = 0;
  logic [DIDX_W+TIDX_W-1:0] mapping_no = '0;
  logic signed [KD_W-1:0] kd = '0;
  logic out_valid, done;
  logic [7:0] out_byte;
  int checks = 0, failures = 0;
  int got[$];

  postcoder dut (.*);

  always @(posedge clk) if (out_valid) got.push_back(int'(out_byte));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int img = 0; img < 3; img++) begin
      bit bq[$];
      int ncode, nb;
      got.delete();
      bq.delete();
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      checks++;
      if (done) begin failures++; $display("FAIL done after restart"); end
      ncode = 1 + int'($urandom % 60);
      for (int c = 0; c < ncode; c++) begin
        int m, k;
        m = int'($urandom % 2048); k = int'($urandom % 128) - 64;
        for (int b = 10; b >= 0; b--) bq.push_back(m[b]);
        for (int b = 6; b >= 0; b--) bq.push_back(k[b]);
        code_valid = 1; mapping_no = 15'(m); kd = 10'(k);
        @(negedge clk);
        code_valid = 0;
        repeat (2 + int'($urandom % 5)) @(negedge clk);
      end
      finish = 1; @(negedge clk); finish = 0;
      repeat (10) @(negedge clk);
      while (bq.size() % 8 != 0) bq.push_back(1'b0);
      nb = bq.size() / 8;
      checks++;
      if (!done || got.size() != nb) begin failures++; $display("FAIL img %0d: done %0d bytes %0d want %0d", img, done, got.size(), nb); end
      for (int i = 0; i < nb && i < got.size(); i++) begin
        int v;
        v = 0;
        for (int b = 0; b < 8; b++) v = (v << 1) | int'(bq[8*i+b]);
        checks++;
        if (got[i] != v) begin failures++; $display("FAIL byte %0d: %02x want %02x", i, got[i], v); end
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
