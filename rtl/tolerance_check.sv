// tolerance_check: mapping-number generation and tolerance check block.
//
// Applies the search rule of the encoding algorithm to the stream of
// per-domain results of one range block:
//  * a domain whose error E is below thresh is accepted at once: its code is
//    issued with matched = 1 and the search of this range ends;
//  * otherwise the best (smallest E, earliest on a tie) mapping seen so far
//    is kept, and when the domain tagged last arrives without a match the
//    best one is issued with matched = 0.
// The mapping number is domain * 8 + transformation. A code leaves one cycle
// after its input (code_valid pulse) together with K_d and E. The kept best
// is cleared whenever a code is issued and by clear (start of a new range).
// The comparison E < Thresh is the document's; the mapping-number layout
// and the tie rule are this design's choice.
module tolerance_check
  import fic_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic [ERR_W-1:0]           thresh,
  input  logic                       in_valid,
  input  logic [ERR_W-1:0]           err,
  input  logic [TIDX_W-1:0]          tidx,
  input  dom_tag_t                   tag,
  output logic                       code_valid,
  output logic                       matched,
  output logic [DIDX_W+TIDX_W-1:0]   mapping_no,
  output logic signed [KD_W-1:0]     code_kd,
  output logic [ERR_W-1:0]           code_err
);
  logic                     have_best;
  logic [ERR_W-1:0]         best_err;
  logic [DIDX_W+TIDX_W-1:0] best_map;
  logic signed [KD_W-1:0]   best_kd;

  logic [DIDX_W+TIDX_W-1:0] map_c;
  logic                     better;

  always_comb begin
    map_c  = {tag.dom, tidx};
    better = !have_best || (err < best_err);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_best <= 1'b0;
      best_err <= '0;
      best_map <= '0;
      best_kd <= '0;
      code_valid <= 1'b0;
      matched <= 1'b0;
      mapping_no <= '0;
      code_kd <= '0;
      code_err <= '0;
    end else begin
      code_valid <= 1'b0;
      if (clear) begin
        have_best <= 1'b0;
      end else if (in_valid) begin
        if (err < thresh) begin
          code_valid <= 1'b1;
          matched    <= 1'b1;
          mapping_no <= map_c;
          code_kd    <= tag.kd;
          code_err   <= err;
          have_best  <= 1'b0;
        end else if (tag.last) begin
          code_valid <= 1'b1;
          matched    <= 1'b0;
          mapping_no <= better ? map_c  : best_map;
          code_kd    <= better ? tag.kd : best_kd;
          code_err   <= better ? err    : best_err;
          have_best  <= 1'b0;
        end else if (better) begin
          have_best <= 1'b1;
          best_err  <= err;
          best_map  <= map_c;
          best_kd   <= tag.kd;
        end
      end
    end
  end
endmodule
