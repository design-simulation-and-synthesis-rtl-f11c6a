// control_unit: sequencer of the fractal encoder.
//
// Runs the encoding algorithm over the image:
//   1. AV pass: one sweep of the image through the average module.
//   2. For every range block (raster order): read its pixels into the range
//      registers, then search the domain lattice row by row. For each domain
//      it starts a fetch (all columns for the first domain of a lattice row,
//      only the L_SPACING new columns otherwise), waits until the window is
//      full, waits until the Term1 units are free (a stall, when fetching is
//      quicker than the 16-cycle Term1 pass), then pulses load: the window
//      moves to stage 2, the Term1 units start, and the domain's tag (number,
//      last flag) is issued. The next fetch starts right away, so fetching
//      domain j+1 overlaps the error computation of domain j.
//   3. When the tolerance check issues a code (a match, or the end of the
//      search), flush empties the pipeline and addresses, and the next range
//      begins. After the last range the output packer is told to finish.
// start is a pulse; done stays high once the whole image has been coded.
// The document leaves the control unit out of its block diagram; this
// schedule is this design's reading of its algorithm and pipeline.
module control_unit
  import fic_pkg::*;
#(
  parameter int IMG_SIZE  = 64,
  parameter int R_SIZE    = 4,
  parameter int L_SPACING = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  // address generator
  input  logic               ag_busy,
  input  logic               dv,
  input  src_e               dv_src,
  input  logic               dv_last,
  input  logic               dv_end,
  output logic               av_start,
  output logic               r_start,
  output logic [DIDX_W-1:0]  r_index,
  output logic               d_start,
  output logic [7:0]         d_x,
  output logic [7:0]         d_y,
  output logic               d_full,
  // datapath
  input  logic               win_full,
  input  logic               g_busy,
  input  logic               code_valid,
  input  logic               pack_done,
  output logic               load,
  output logic [DIDX_W-1:0]  load_dom,
  output logic               load_last,
  output logic               flush,
  output logic               pack_finish,
  output logic               stall,
  output logic               done
);
  localparam int D_SIZE = 2 * R_SIZE;
  localparam int NDOM1  = (IMG_SIZE - D_SIZE) / L_SPACING + 1;  // domains per lattice row
  localparam int NRANGE = (IMG_SIZE / R_SIZE) * (IMG_SIZE / R_SIZE);

  typedef enum logic [3:0] {
    S_IDLE, S_AV, S_AV_WAIT, S_RANGE, S_R_WAIT, S_FETCH, S_FILL,
    S_LOAD, S_WAIT_CODE, S_FINISH, S_DONE
  } state_e;

  state_e state;
  logic [7:0] dx, dy;
  logic       searching;
  logic       last_dom;

  assign d_x = dx;
  assign d_y = dy;
  assign d_full = (dx == 8'd0);
  assign last_dom = (dx == 8'(NDOM1-1)) && (dy == 8'(NDOM1-1));
  assign searching = (state == S_FETCH) || (state == S_FILL) ||
                     (state == S_LOAD) || (state == S_WAIT_CODE);

  always_comb begin
    av_start    = (state == S_AV);
    r_start     = (state == S_RANGE);
    d_start     = (state == S_FETCH) && !code_valid;
    load        = (state == S_LOAD) && !g_busy && !code_valid;
    stall       = (state == S_LOAD) && g_busy && !code_valid;
    load_dom    = DIDX_W'(32'(dy) * NDOM1 + 32'(dx));
    load_last   = last_dom;
    flush       = searching && code_valid;
    pack_finish = (state == S_FINISH);
    done        = (state == S_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r_index <= '0;
      dx <= '0;
      dy <= '0;
    end else if (flush) begin
      dx <= '0;
      dy <= '0;
      if (r_index == DIDX_W'(NRANGE-1)) begin
        state <= S_FINISH;
      end else begin
        r_index <= r_index + 1'b1;
        state <= S_RANGE;
      end
    end else begin
      unique case (state)
        S_IDLE:    if (start) begin
                     r_index <= '0;
                     state <= S_AV;
                   end
        S_AV:      state <= S_AV_WAIT;
        S_AV_WAIT: if (dv && dv_src == SRC_AV && dv_end) state <= S_RANGE;
        S_RANGE:   begin
                     dx <= '0;
                     dy <= '0;
                     state <= S_R_WAIT;
                   end
        S_R_WAIT:  if (dv && dv_src == SRC_R && dv_last) state <= S_FETCH;
        S_FETCH:   state <= S_FILL;
        S_FILL:    if (win_full) state <= S_LOAD;
        S_LOAD:    if (!g_busy) begin
                     if (last_dom) begin
                       state <= S_WAIT_CODE;
                     end else begin
                       if (dx == 8'(NDOM1-1)) begin
                         dx <= '0;
                         dy <= dy + 8'd1;
                       end else begin
                         dx <= dx + 8'd1;
                       end
                       state <= S_FETCH;
                     end
                   end
        S_WAIT_CODE: ;
        S_FINISH:  if (pack_done) state <= S_DONE;
        S_DONE:    if (start) begin
                     r_index <= '0;
                     state <= S_AV;
                   end
        default:   state <= S_IDLE;
      endcase
    end
  end

  a_fetch_idle: assert property (@(posedge clk) disable iff (!rst_n) d_start |-> !ag_busy);
endmodule
