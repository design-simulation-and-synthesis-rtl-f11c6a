// tb_control_unit: the sequencer on a 16 x 16 image (3 x 3 domain lattice,
// 16 ranges) against a simple model of the datapath around it. The model
// answers the average pass, range reads and domain fetches after short
// delays, keeps the Term1 units busy for a random time after each load, and
// reports a code either at a randomly chosen domain (a match) or after the
// last one. Checks: the order of ranges and domains, full fetches exactly at
// the start of each lattice row, the last flag, no load while Term1 is busy,
// stall while it waits, flush on every code, no loads after a match, the
// packer's finish and done.

module tb_control_unit;
  import fic_pkg::*;
  localparam int IMG = 16, ND1 = 3, NR = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0;
  logic ag_busy = 0, dv = 0, dv_last = 0, dv_end = 0;
  src_e dv_src = SRC_NONE;
  logic av_start, r_start, d_start, d_full;
  logic [DIDX_W-1:0] r_index, load_dom;
  logic [7:0] d_x, d_y;
  logic win_full = 0, g_busy = 0, code_valid = 0, pack_done = 0;
  logic load, load_last, flush, pack_finish, stall, done;
  int checks = 0, failures = 0;

  control_unit #(.IMG_SIZE(IMG)) dut (.*);

  int cur_range, next_dom, match_at[NR], n_flush, n_stall, n_loads;
  int code_delay, busy_left;
  bit av_seen;

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL %s", s);
  endtask

  // datapath model
  always @(posedge clk) begin
    dv <= 0; dv_last <= 0; dv_end <= 0; dv_src <= SRC_NONE; code_valid <= 0;
    if (busy_left > 0) busy_left--;
    g_busy <= (busy_left > 1);
    if (av_start) begin
      av_seen = 1;
      fork begin repeat (6) @(posedge clk); dv <= 1; dv_src <= SRC_AV; dv_end <= 1; end join_none
    end
    if (r_start) begin
      checks++;
      if (int'(r_index) != cur_range) fail($sformatf("range %0d want %0d", r_index, cur_range));
      next_dom = 0;
      fork begin repeat (3) @(posedge clk); dv <= 1; dv_src <= SRC_R; dv_last <= 1; end join_none
    end
    if (d_start) begin
      checks++;
      if (int'(d_y)*ND1 + int'(d_x) != next_dom || d_full != (d_x == 0))
        fail($sformatf("fetch (%0d,%0d) full %0d, want domain %0d", d_x, d_y, d_full, next_dom));
      fork begin repeat (2 + $urandom % 6) @(posedge clk); win_full <= 1; end join_none
    end
    if (stall) n_stall++;
    if (load) begin
      n_loads++;
      checks++;
      if (g_busy) fail("load while Term1 busy");
      if (!win_full) fail("load without full window");
      if (int'(load_dom) != next_dom || load_last != (next_dom == ND1*ND1-1))
        fail($sformatf("load dom %0d last %0d, want %0d", load_dom, load_last, next_dom));
      // The search runs ahead of the error pipeline, so a domain or two past
      // the match may be loaded before the code arrives; never more.
      if (next_dom > match_at[cur_range] + 2) fail("search ran on after the match");
      win_full <= 0;
      busy_left = 1 + int'($urandom % 14);
      g_busy <= 1;
      if (next_dom == match_at[cur_range] || next_dom == ND1*ND1-1) code_delay = busy_left + 3;
      next_dom++;
    end
    if (code_delay > 0) begin
      code_delay--;
      if (code_delay == 0) code_valid <= 1;
    end
    if (flush) begin
      n_flush++;
      win_full <= 0;
      busy_left = 0;
      g_busy <= 0;
      cur_range++;
    end
    if (pack_finish) fork begin repeat (2) @(posedge clk); pack_done <= 1; end join_none
  end

  initial begin
    cur_range = 0; next_dom = 0; n_flush = 0; n_stall = 0; n_loads = 0; code_delay = 0;
    busy_left = 0; av_seen = 0;
    for (int r = 0; r < NR; r++) match_at[r] = (r % 3 == 0) ? 99 : int'($urandom % 9);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    checks++;
    if (!av_seen) fail("no average pass");
    checks++;
    if (n_flush != NR || cur_range != NR) fail($sformatf("flushes %0d", n_flush));
    checks++;
    if (n_stall == 0) fail("never stalled");
    $display("loads %0d stalls %0d flushes %0d", n_loads, n_stall, n_flush);
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
