// tb_addr_gen: checks the three address sequences at the default 64 x 64
// size: the whole average pass (block by block, raster inside), range
// blocks, and full and partial (last L_SPACING columns) domain fetches, read
// column by column. Every address, the one-cycle busy/mem_rd count, and the
// data-aligned tags (source, index, last, column end, end of pass) are
// compared with sequences computed here. It also checks that flush stops a
// fetch and drops the read in flight.
module tb_addr_gen;
  import fic_pkg::*;
  localparam int IMG = 64, RS = 4, AVS = 4, L = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, flush = 0, av_start = 0, r_start = 0, d_start = 0, d_full = 0;
  logic [DIDX_W-1:0] r_index = '0;
  logic [7:0] d_x = 0, d_y = 0;
  logic busy, mem_rd, dv, dv_last, dv_col_end, dv_end;
  logic [ADDR_W-1:0] mem_addr;
  src_e dv_src;
  logic [7:0] dv_idx;
  int checks = 0, failures = 0;

  addr_gen dut (.*);

  typedef struct { int addr; src_e src; int idx; bit last; bit col_end; bit fin; } exp_t;
  exp_t expq[$];
  int rd_addr_q[$];

  // record addresses in issue order and tags in return order
  always @(posedge clk) if (rst_n) begin
    if (mem_rd && !flush) rd_addr_q.push_back(int'(mem_addr));
    if (dv) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected read");
      end else begin
        int a;
        e = expq.pop_front();
        a = rd_addr_q.pop_front();
        if (!(a == e.addr && dv_src == e.src && int'(dv_idx) == e.idx && dv_last == e.last &&
              dv_col_end == e.col_end && dv_end == e.fin)) begin
          failures++;
          if (failures < 10)
            $display("FAIL addr %0d want %0d src %0d idx %0d/%0d last %0d/%0d", a, e.addr, dv_src,
                     dv_idx, e.idx, dv_last, e.last);
        end
      end
    end
  end

  task automatic wait_idle();
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d reads missing", expq.size()); end
    expq.delete(); rd_addr_q.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // average pass
    for (int by = 0; by < IMG/AVS; by++)
      for (int bx = 0; bx < IMG/AVS; bx++)
        for (int py = 0; py < AVS; py++)
          for (int px = 0; px < AVS; px++)
            expq.push_back('{(by*AVS+py)*IMG + bx*AVS+px, SRC_AV, py*AVS+px,
                             (px == AVS-1 && py == AVS-1), 0,
                             (px == AVS-1 && py == AVS-1 && bx == IMG/AVS-1 && by == IMG/AVS-1)});
    av_start <= 1; @(posedge clk); av_start <= 0;
    wait_idle();
    // range blocks
    for (int n = 0; n < 20; n++) begin
      int ri, x0, y0;
      ri = (n == 0) ? 255 : int'($urandom % 256);
      x0 = (ri % (IMG/RS)) * RS; y0 = (ri / (IMG/RS)) * RS;
      for (int py = 0; py < RS; py++)
        for (int px = 0; px < RS; px++)
          expq.push_back('{(y0+py)*IMG + x0+px, SRC_R, py*RS+px, (px == RS-1 && py == RS-1), 0, 0});
      r_index <= DIDX_W'(ri); r_start <= 1; @(posedge clk); r_start <= 0;
      wait_idle();
    end
    // domains
    for (int n = 0; n < 30; n++) begin
      int dxx, dyy, c0;
      bit full;
      dxx = int'($urandom % 15); dyy = int'($urandom % 15);
      if (n == 0) begin dxx = 14; dyy = 14; end
      full = (n % 3 == 0);
      c0 = full ? 0 : 2*RS - L;
      for (int c = c0; c < 2*RS; c++)
        for (int r = 0; r < 2*RS; r++)
          expq.push_back('{(dyy*L + r)*IMG + dxx*L + c, SRC_D, r,
                           (c == 2*RS-1 && r == 2*RS-1), (r == 2*RS-1), 0});
      d_x <= 8'(dxx); d_y <= 8'(dyy); d_full <= full; d_start <= 1;
      @(posedge clk); d_start <= 0;
      wait_idle();
    end
    // flush in the middle of a fetch
    d_x <= 8'd1; d_y <= 8'd1; d_full <= 1; d_start <= 1;
    @(posedge clk); d_start <= 0;
    for (int r = 0; r < 5; r++)
      expq.push_back('{(4 + r)*IMG + 4, SRC_D, r, 0, 0, 0});
    repeat (5) @(posedge clk);
    flush <= 1;
    @(posedge clk);
    flush <= 0;
    @(posedge clk);
    checks++;
    if (busy || dv) begin failures++; $display("FAIL flush did not stop the fetch"); end
    wait_idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
