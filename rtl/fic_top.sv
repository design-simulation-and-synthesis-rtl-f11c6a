// fic_top: fractal image coding encoder.
//
// Encodes a square IMG_SIZE x IMG_SIZE 8-bit grey image held in an external
// memory. First it streams out the quantized averages of the image's
// AV_SIZE x AV_SIZE blocks (avg_valid / avg_q). Then, for every R_SIZE x
// R_SIZE range block, it searches the domain blocks (twice the range size, on
// a lattice of spacing L_SPACING) for the one that, shrunk by 2x2 averaging,
// transformed by one of eight rotations/flips and shifted by a grey-level
// offset K, best matches the range. The search of a range stops at the first
// domain whose mean squared error is below thresh; otherwise the best one is
// taken. Each range yields a code: mapping number (domain * 8 + transform)
// and the quantized offset K_d, packed MSB first into the byte stream
// out_valid / out_byte. done rises when the last byte has left.
//
// Datapath, in the order data flows:
//   addr_gen (A) -> external memory -> init_avg (B) | range_access (C) |
//   domain_avg_transform (D) -> term1_comp (G, eight units) and
//   kd_comp (E) -> term2_comp (F) -> min_term1 (H) -> final_error (I) ->
//   tolerance_check -> postcoder.
// control_unit sequences it. Fetching domain j+1 overlaps the Term1 pass of
// domain j (stage-2 register in D).
//
// Memory interface: mem_addr = row * IMG_SIZE + column, read when mem_rd is
// high; mem_data must hold that pixel in the next cycle (one-cycle
// synchronous read). The code stream before packing is also brought out
// (code_*), for observation.
// Defaults: 64 x 64 images, the size the document evaluates. R_SIZE = 4 is
// inferred from the 20-bit Term1 width; L_SPACING, STEP_SIZE and AV_SIZE are
// this design's choices, the document gives no values.
module fic_top
  import fic_pkg::*;
#(
  parameter int IMG_SIZE  = 64,
  parameter int R_SIZE    = 4,
  parameter int L_SPACING = 4,
  parameter int STEP_SIZE = 4,
  parameter int AV_SIZE   = 4,
  parameter int AVQ_W     = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [ERR_W-1:0]           thresh,
  output logic                       mem_rd,
  output logic [ADDR_W-1:0]          mem_addr,
  input  logic [PIX_W-1:0]           mem_data,
  output logic                       avg_valid,
  output logic [AVQ_W-1:0]           avg_q,
  output logic                       code_valid,
  output logic                       code_matched,
  output logic [DIDX_W+TIDX_W-1:0]   code_mapping,
  output logic signed [KD_W-1:0]     code_kd,
  output logic [ERR_W-1:0]           code_err,
  output logic                       out_valid,
  output logic [7:0]                 out_byte,
  output logic                       stall,
  output logic                       done
);
  localparam int D_SIZE   = 2 * R_SIZE;
  localparam int NDOM1    = (IMG_SIZE - D_SIZE) / L_SPACING + 1;
  localparam int MAP_BITS = $clog2(NDOM1 * NDOM1) + TIDX_W;
  localparam int KD_BITS  = PIX_W + 1 - $clog2(STEP_SIZE);

  // address generator
  logic              ag_busy, dv, dv_last, dv_col_end, dv_end;
  src_e              dv_src;
  logic [7:0]        dv_idx;
  logic              av_start, r_start, d_start, d_full;
  logic [DIDX_W-1:0] r_index;
  logic [7:0]        d_x, d_y;
  // control
  logic              load, load_last, flush, pack_finish, pack_done;
  logic [DIDX_W-1:0] load_dom;
  // datapath
  logic [PIX_W-1:0]   avg8, r_pix;
  logic [SUM_W-1:0]   sum_r, sum_d;
  logic               win_full, s2_valid;
  logic [PIX_W-1:0]   t_pix [NTRANS];
  logic [7:0]         g_idx;
  logic               g_busy, g_done;
  logic [TERM1_W-1:0] term1 [NTRANS];
  logic signed [SUM_W:0]     t_diff;
  logic signed [KD_W-1:0]    kd, k;
  logic signed [TERM2_W-1:0] i_fac, term2;
  dom_tag_t           s2_tag, g_tag, h_tag, i_tag;
  logic               h_valid, i_valid;
  logic [TERM1_W-1:0] h_min;
  logic [TIDX_W-1:0]  h_idx, i_idx;
  logic [ERR_W-1:0]   i_err;

  addr_gen #(.IMG_SIZE(IMG_SIZE), .R_SIZE(R_SIZE), .AV_SIZE(AV_SIZE), .L_SPACING(L_SPACING)) u_ag (
    .clk, .rst_n, .flush,
    .av_start, .r_start, .r_index, .d_start, .d_x, .d_y, .d_full,
    .busy(ag_busy), .mem_rd, .mem_addr,
    .dv, .dv_src, .dv_idx, .dv_last, .dv_col_end, .dv_end
  );

  init_avg #(.AV_SIZE(AV_SIZE), .AVQ_W(AVQ_W)) u_avg (
    .clk, .rst_n,
    .pix_valid(dv && dv_src == SRC_AV), .pix(mem_data), .pix_last(dv_last),
    .out_valid(avg_valid), .avg(avg8), .avg_q
  );

  range_access #(.R_SIZE(R_SIZE)) u_range (
    .clk, .rst_n,
    .wr_en(dv && dv_src == SRC_R), .wr_idx(dv_idx), .wr_pix(mem_data),
    .rd_idx(g_idx), .r_pix, .sum_r
  );

  domain_avg_transform #(.R_SIZE(R_SIZE)) u_dom (
    .clk, .rst_n, .flush,
    .pix_valid(dv && dv_src == SRC_D), .pix(mem_data),
    .pix_col_end(dv_col_end), .pix_last(dv_last),
    .load, .sel_idx(g_idx),
    .win_full, .s2_valid, .sum_d, .t_pix
  );

  term1_comp #(.R_SIZE(R_SIZE)) u_term1 (
    .clk, .rst_n, .flush, .start(load),
    .r_pix, .t_pix, .idx(g_idx), .busy(g_busy), .done(g_done), .term1
  );

  kd_comp #(.R_SIZE(R_SIZE), .STEP_SIZE(STEP_SIZE)) u_kd (
    .sum_r, .sum_d, .t_diff, .kd, .k
  );

  term2_comp #(.R_SIZE(R_SIZE)) u_term2 (
    .k, .t_diff, .i_fac, .term2
  );

  // Tag of the domain held in stage 2; K_d and Term2 belong to that domain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_tag <= '0;
    else if (load) begin
      s2_tag.dom  <= load_dom;
      s2_tag.last <= load_last;
    end
  end
  always_comb begin
    g_tag       = s2_tag;
    g_tag.kd    = kd;
    g_tag.term2 = term2;
  end

  min_term1 u_min (
    .clk, .rst_n, .flush,
    .in_valid(g_done), .term1, .in_tag(g_tag),
    .out_valid(h_valid), .min_val(h_min), .min_idx(h_idx), .out_tag(h_tag)
  );

  final_error #(.R_SIZE(R_SIZE)) u_err (
    .clk, .rst_n, .flush,
    .in_valid(h_valid), .min_term1(h_min), .in_tidx(h_idx), .in_tag(h_tag),
    .out_valid(i_valid), .err(i_err), .out_tidx(i_idx), .out_tag(i_tag)
  );

  tolerance_check u_tol (
    .clk, .rst_n, .clear(flush), .thresh,
    .in_valid(i_valid), .err(i_err), .tidx(i_idx), .tag(i_tag),
    .code_valid, .matched(code_matched), .mapping_no(code_mapping),
    .code_kd, .code_err
  );

  postcoder #(.MAP_BITS(MAP_BITS), .KD_BITS(KD_BITS)) u_pack (
    .clk, .rst_n, .code_valid, .mapping_no(code_mapping), .kd(code_kd),
    .restart(av_start), .finish(pack_finish), .out_valid, .out_byte, .done(pack_done)
  );

  control_unit #(.IMG_SIZE(IMG_SIZE), .R_SIZE(R_SIZE), .L_SPACING(L_SPACING)) u_ctrl (
    .clk, .rst_n, .start,
    .ag_busy, .dv, .dv_src, .dv_last, .dv_end,
    .av_start, .r_start, .r_index, .d_start, .d_x, .d_y, .d_full,
    .win_full, .g_busy, .code_valid, .pack_done,
    .load, .load_dom, .load_last, .flush, .pack_finish, .stall, .done
  );
endmodule
