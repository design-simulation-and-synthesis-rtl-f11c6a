// fic_harness: drives one encoder instance through whole-image encodings and
// checks every output against the reference model.
//
// For each run it loads a test image into the memory model, pulses start
// with the given threshold, collects the average stream, the per-range code
// stream and the packed bytes until done, and compares them with
// fic_ref_pkg. Three runs use a middle threshold (a mix of early matches and
// exhaustive searches), threshold 0 (every search exhaustive) and the
// largest threshold (every range accepts its first domain). It counts the
// mechanisms of the design as they happen: full and partial (overlapping)
// domain fetches, fetch overlapping a Term1 pass, stalls, early matches,
// exhaustive fallbacks and flushes of a fetch in flight.
module fic_harness
  import fic_pkg::*;
  import fic_ref_pkg::*;
#(
  parameter int IMG_SIZE  = 16,
  parameter int L_SPACING = 4,
  parameter int MID_THRESH = 0
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_full, n_part, n_overlap, n_stall, n_match, n_fallback, n_flush_fetch,
  output longint cycles_exh
);
  localparam int R_SIZE = 4, STEP = 4, AVS = 4, AVQ = 5;
  localparam int NRANGE = (IMG_SIZE/R_SIZE)*(IMG_SIZE/R_SIZE);
  localparam int NAVB   = (IMG_SIZE/AVS)*(IMG_SIZE/AVS);

  logic rst_n, start;
  logic [ERR_W-1:0] thresh;
  logic mem_rd, we;
  logic [15:0] mem_addr, waddr;
  logic [7:0] mem_data, wdata;
  logic avg_valid, code_valid, code_matched, out_valid, done, stall;
  logic [AVQ-1:0] avg_q;
  logic [DIDX_W+TIDX_W-1:0] code_mapping;
  logic signed [KD_W-1:0] code_kd;
  logic [ERR_W-1:0] code_err;
  logic [7:0] out_byte;

  fic_top #(.IMG_SIZE(IMG_SIZE), .L_SPACING(L_SPACING)) dut (
    .clk, .rst_n, .start, .thresh, .mem_rd, .mem_addr, .mem_data,
    .avg_valid, .avg_q, .code_valid, .code_matched, .code_mapping, .code_kd,
    .code_err, .out_valid, .out_byte, .stall, .done
  );

  interleaved_memory #(.DEPTH(IMG_SIZE*IMG_SIZE)) mem (
    .clk, .rd(mem_rd), .addr(mem_addr), .data(mem_data), .we, .waddr, .wdata
  );

  int avgs[$], bytes_q[$];
  code_t codes[$];

  always @(posedge clk) if (rst_n) begin
    if (avg_valid) avgs.push_back(int'(avg_q));
    if (out_valid) bytes_q.push_back(int'(out_byte));
    if (code_valid) begin
      code_t c;
      c.dom = int'(code_mapping) / 8; c.tidx = int'(code_mapping) % 8;
      c.kd = int'(code_kd); c.err = int'(code_err); c.matched = code_matched;
      codes.push_back(c);
      if (code_matched) n_match++; else n_fallback++;
    end
    if (dut.u_ctrl.d_start &&  dut.u_ctrl.d_full) n_full++;
    if (dut.u_ctrl.d_start && !dut.u_ctrl.d_full) n_part++;
    if (dut.u_term1.busy && dut.u_ag.mode == SRC_D) n_overlap++;
    if (stall) n_stall++;
    if (dut.flush && dut.u_ag.busy) n_flush_fetch++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [IMG=%0d L=%0d] %s", IMG_SIZE, L_SPACING, what);
    end
  endtask

  task automatic run(fic_model m, int th);
    int exp_bytes[$];
    code_t e;
    longint t0;
    avgs.delete(); bytes_q.delete(); codes.delete();
    thresh = ERR_W'(th);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    t0 = 1;
    while (!done) begin @(posedge clk); t0++; end
    if (th == 0) cycles_exh = t0;
    $display("[IMG=%0d L=%0d] thresh=%0d: %0d cycles", IMG_SIZE, L_SPACING, th, t0);
    check(avgs.size() == NAVB, $sformatf("average count %0d", avgs.size()));
    for (int b = 0; b < NAVB && b < avgs.size(); b++)
      check(avgs[b] == m.avg_q(b), $sformatf("avg %0d: %0d vs %0d", b, avgs[b], m.avg_q(b)));
    check(codes.size() == NRANGE, $sformatf("code count %0d", codes.size()));
    for (int r = 0; r < NRANGE; r++) begin
      e = m.encode_range(r, th);
      m.pack(e);
      if (r < codes.size()) begin
        check(codes[r].dom == e.dom && codes[r].tidx == e.tidx && codes[r].kd == e.kd &&
              codes[r].err == e.err && codes[r].matched == e.matched,
              $sformatf("range %0d th %0d: got dom %0d t %0d kd %0d err %0d m %0d, want dom %0d t %0d kd %0d err %0d m %0d",
                        r, th, codes[r].dom, codes[r].tidx, codes[r].kd, codes[r].err, codes[r].matched,
                        e.dom, e.tidx, e.kd, e.err, e.matched));
      end
    end
    m.bytes(exp_bytes);
    check(bytes_q.size() == exp_bytes.size(), $sformatf("byte count %0d vs %0d", bytes_q.size(), exp_bytes.size()));
    for (int i = 0; i < exp_bytes.size() && i < bytes_q.size(); i++)
      check(bytes_q[i] == exp_bytes[i], $sformatf("byte %0d", i));
  endtask

  initial begin
    fic_model m;
    checks = 0; failures = 0; finished = 0;
    n_full = 0; n_part = 0; n_overlap = 0; n_stall = 0; n_match = 0; n_fallback = 0;
    n_flush_fetch = 0; cycles_exh = 0;
    rst_n = 0; start = 0; we = 0; waddr = '0; wdata = '0; thresh = '0;
    m = new(IMG_SIZE, R_SIZE, L_SPACING, STEP, AVS, AVQ);
    m.make_image(7 + L_SPACING);
    wait (go);
    for (int a = 0; a < IMG_SIZE*IMG_SIZE; a++) begin
      @(posedge clk);
      we <= 1'b1; waddr <= 16'(a); wdata <= 8'(m.img[a]);
    end
    @(posedge clk);
    we <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    begin
      // Middle threshold: the median of the best errors, so that about half
      // of the ranges stop early and the rest search exhaustively.
      int errs[$];
      int mid;
      for (int r = 0; r < NRANGE; r++) begin
        code_t c;
        c = m.encode_range(r, 0);
        errs.push_back(c.err);
      end
      errs.sort();
      mid = errs[NRANGE/2] + 1;
      if (MID_THRESH > mid) mid = MID_THRESH;
      run(m, mid);
    end
    run(m, 0);
    run(m, (1 << ERR_W) - 1);
    finished = 1;
  end
endmodule
