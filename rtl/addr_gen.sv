// addr_gen: address generation module (A) of the fractal encoder.
//
// Three generators share the single 16-bit memory address through the
// Addr-Mux, as in the chip's block diagram:
//   Av-Addr  walks the whole image once, block by block (AV_SIZE x AV_SIZE
//            blocks in raster order, pixels in raster order inside a block),
//            for the initial image averages.
//   R-Addr   reads the R_SIZE x R_SIZE range block r_index in raster order.
//   D-Addr   reads domain (d_x, d_y) of the lattice with spacing L_SPACING,
//            column by column, top to bottom. With d_full it reads all
//            2*R_SIZE columns; otherwise only the last L_SPACING columns,
//            the part that does not overlap the previous domain of the row.
// The address is row * IMG_SIZE + column. A command starts with a one-cycle
// *_start pulse while busy is low; one address is issued per cycle with
// mem_rd high. The memory answers one cycle later, and the dv_* outputs are
// the read's tags delayed by that cycle so they line up with the data:
// dv_idx is the pixel index inside the block (AV, R) or the row inside the
// column (D), dv_last marks the last pixel of a block (AV), of the range (R)
// or of the fetch (D), dv_col_end the last pixel of a domain column and
// dv_end the last pixel of the whole average pass. flush stops everything
// and drops reads in flight.
// Own choices: raster/column orders, one-cycle read latency, command pulses.
module addr_gen
  import fic_pkg::*;
#(
  parameter int IMG_SIZE  = 64,
  parameter int R_SIZE    = 4,
  parameter int AV_SIZE   = 4,
  parameter int L_SPACING = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic               av_start,
  input  logic               r_start,
  input  logic [DIDX_W-1:0]  r_index,
  input  logic               d_start,
  input  logic [7:0]         d_x,
  input  logic [7:0]         d_y,
  input  logic               d_full,
  output logic               busy,
  output logic               mem_rd,
  output logic [ADDR_W-1:0]  mem_addr,
  output logic               dv,
  output src_e               dv_src,
  output logic [7:0]         dv_idx,
  output logic               dv_last,
  output logic               dv_col_end,
  output logic               dv_end
);
  localparam int D_SIZE = 2 * R_SIZE;
  localparam int NAV    = IMG_SIZE / AV_SIZE;   // average blocks per row
  localparam int NRX    = IMG_SIZE / R_SIZE;    // range blocks per row

  src_e mode;

  // Av-Addr counters
  logic [7:0] av_bx, av_by, av_px, av_py;
  // R-Addr counters
  logic [7:0] r_x0, r_y0, r_px, r_py;
  // D-Addr counters
  logic [7:0] d_x0, d_y0, d_col, d_row;

  logic [ADDR_W-1:0] av_addr, r_addr, d_addr;
  logic av_blk_last, av_all_last, r_last, d_col_last, d_last;

  always_comb begin
    av_addr = ADDR_W'((32'(av_by) * AV_SIZE + 32'(av_py)) * IMG_SIZE + 32'(av_bx) * AV_SIZE + 32'(av_px));
    r_addr  = ADDR_W'((32'(r_y0) + 32'(r_py)) * IMG_SIZE + 32'(r_x0) + 32'(r_px));
    d_addr  = ADDR_W'((32'(d_y0) + 32'(d_row)) * IMG_SIZE + 32'(d_x0) + 32'(d_col));
    av_blk_last = (av_px == 8'(AV_SIZE-1)) && (av_py == 8'(AV_SIZE-1));
    av_all_last = av_blk_last && (av_bx == 8'(NAV-1)) && (av_by == 8'(NAV-1));
    r_last      = (r_px == 8'(R_SIZE-1)) && (r_py == 8'(R_SIZE-1));
    d_col_last  = (d_row == 8'(D_SIZE-1));
    d_last      = d_col_last && (d_col == 8'(D_SIZE-1));
  end

  // Addr-Mux
  always_comb begin
    mem_rd   = (mode != SRC_NONE);
    unique case (mode)
      SRC_AV:  mem_addr = av_addr;
      SRC_R:   mem_addr = r_addr;
      SRC_D:   mem_addr = d_addr;
      default: mem_addr = '0;
    endcase
  end
  assign busy = (mode != SRC_NONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= SRC_NONE;
      {av_bx, av_by, av_px, av_py} <= '0;
      {r_x0, r_y0, r_px, r_py}     <= '0;
      {d_x0, d_y0, d_col, d_row}   <= '0;
    end else if (flush) begin
      mode <= SRC_NONE;
    end else begin
      unique case (mode)
        SRC_NONE: begin
          if (av_start) begin
            mode <= SRC_AV;
            {av_bx, av_by, av_px, av_py} <= '0;
          end else if (r_start) begin
            mode <= SRC_R;
            r_x0 <= 8'((32'(r_index) % NRX) * R_SIZE);
            r_y0 <= 8'((32'(r_index) / NRX) * R_SIZE);
            r_px <= '0;
            r_py <= '0;
          end else if (d_start) begin
            mode  <= SRC_D;
            d_x0  <= 8'(32'(d_x) * L_SPACING);
            d_y0  <= 8'(32'(d_y) * L_SPACING);
            d_col <= d_full ? 8'd0 : 8'(D_SIZE - L_SPACING);
            d_row <= '0;
          end
        end
        SRC_AV: begin
          if (av_all_last) mode <= SRC_NONE;
          if (av_px == 8'(AV_SIZE-1)) begin
            av_px <= '0;
            if (av_py == 8'(AV_SIZE-1)) begin
              av_py <= '0;
              if (av_bx == 8'(NAV-1)) begin
                av_bx <= '0;
                av_by <= av_by + 8'd1;
              end else begin
                av_bx <= av_bx + 8'd1;
              end
            end else begin
              av_py <= av_py + 8'd1;
            end
          end else begin
            av_px <= av_px + 8'd1;
          end
        end
        SRC_R: begin
          if (r_last) mode <= SRC_NONE;
          if (r_px == 8'(R_SIZE-1)) begin
            r_px <= '0;
            r_py <= r_py + 8'd1;
          end else begin
            r_px <= r_px + 8'd1;
          end
        end
        SRC_D: begin
          if (d_last) mode <= SRC_NONE;
          if (d_col_last) begin
            d_row <= '0;
            d_col <= d_col + 8'd1;
          end else begin
            d_row <= d_row + 8'd1;
          end
        end
      endcase
    end
  end

  // Tags of the read in flight, aligned with the returning data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv <= 1'b0;
      dv_src <= SRC_NONE;
      dv_idx <= '0;
      dv_last <= 1'b0;
      dv_col_end <= 1'b0;
      dv_end <= 1'b0;
    end else begin
      dv     <= mem_rd && !flush;
      dv_src <= flush ? SRC_NONE : mode;
      unique case (mode)
        SRC_AV: begin
          dv_idx <= 8'(32'(av_py) * AV_SIZE + 32'(av_px));
          dv_last <= av_blk_last;
          dv_col_end <= 1'b0;
          dv_end <= av_all_last && !flush;
        end
        SRC_R: begin
          dv_idx <= 8'(32'(r_py) * R_SIZE + r_px);
          dv_last <= r_last;
          dv_col_end <= 1'b0;
          dv_end <= 1'b0;
        end
        SRC_D: begin
          dv_idx <= d_row;
          dv_last <= d_last;
          dv_col_end <= d_col_last;
          dv_end <= 1'b0;
        end
        default: begin
          dv_idx <= '0;
          dv_last <= 1'b0;
          dv_col_end <= 1'b0;
          dv_end <= 1'b0;
        end
      endcase
    end
  end

  // A new command is only accepted while idle.
  a_cmd_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (av_start || r_start || d_start) |-> !busy);

endmodule
