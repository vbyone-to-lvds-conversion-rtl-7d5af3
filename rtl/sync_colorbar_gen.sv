// Video timing and colour-bar generator for a 3840 x 2160, 60 Hz panel.
//
// A pixel counter runs 0..H_TOTAL-1 at the pixel clock, one count per group
// of PIX_PER_CLK pixels (550 counts = 4400 pixels), and a line counter runs
// 0..V_TOTAL-1, stepping when the pixel counter wraps. With the defaults one
// frame is 550 x 2250 clocks, i.e. 60 Hz at 74.25 MHz.
//   hsync : high while HS_AFTER < pixel count < HS_BEFORE (23..32)
//   vsync : high while VS_AFTER < line count  < VS_BEFORE
//   de    : high while pixel count >= H_ACT_START and line count >= V_ACT_START
//           (480 clocks x 2160 lines of active video)
// During de all PIX_PER_CLK pixels of a clock take the colour of a 4 x 4 bar
// grid: the column is chosen by the pixel count against COL_B1..COL_B3
// (190, 310, 430) and the row by the line count against ROW_B1..ROW_B3
// (630, 1170, 1710). The colours per row are
//   row 0: red   green blue  cyan
//   row 1: blue  cyan  red   green
//   row 2: green blue  cyan  red
//   row 3: cyan  red   green cyan
// Outside de the pixels are black.
//
// Timing: all outputs are registered and describe the counter values they
// were computed from, so pixel_cnt/line_cnt, hsync, vsync, de and pixels
// change together one clock after the counters advance. rst is synchronous,
// active high, and clears both counters.
//
// The totals, active starts, hsync window, bar boundaries and colour grid
// follow the document. The vsync window (lines 3..12) is this design's own
// choice, as the document gives no numbers for it, and so are the black
// blanking pixels and the colour codes.
module sync_colorbar_gen
  import vbo_lvds_pkg::*;
#(
  parameter int unsigned H_TOTAL     = 550,
  parameter int unsigned H_ACT_START = 70,
  parameter int unsigned HS_AFTER    = 22,
  parameter int unsigned HS_BEFORE   = 33,
  parameter int unsigned V_TOTAL     = 2250,
  parameter int unsigned V_ACT_START = 90,
  parameter int unsigned VS_AFTER    = 2,
  parameter int unsigned VS_BEFORE   = 13,
  parameter int unsigned COL_B1      = 190,
  parameter int unsigned COL_B2      = 310,
  parameter int unsigned COL_B3      = 430,
  parameter int unsigned ROW_B1      = 630,
  parameter int unsigned ROW_B2      = 1170,
  parameter int unsigned ROW_B3      = 1710,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL)
) (
  input  logic            clk,
  input  logic            rst,
  output logic [HW-1:0]   pixel_cnt,
  output logic [VW-1:0]   line_cnt,
  output logic            hsync,
  output logic            vsync,
  output logic            de,
  output pixel_t          pixels [PIX_PER_CLK]
);

  logic [HW-1:0] pc;
  logic [VW-1:0] lc;

  // Counters: pixel count wraps at H_TOTAL and steps the line count.
  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0;
      lc <= '0;
    end else if (pc < HW'(H_TOTAL - 1)) begin
      pc <= pc + 1'b1;
    end else begin
      pc <= '0;
      lc <= (lc < VW'(V_TOTAL - 1)) ? lc + 1'b1 : '0;
    end
  end

  logic   de_c, hs_c, vs_c;
  pixel_t color_c;
  logic [1:0] col, row;

  always_comb begin
    de_c = (pc >= HW'(H_ACT_START)) && (lc >= VW'(V_ACT_START));
    hs_c = (pc > HW'(HS_AFTER)) && (pc < HW'(HS_BEFORE));
    vs_c = (lc > VW'(VS_AFTER)) && (lc < VW'(VS_BEFORE));

    if      (pc < HW'(COL_B1)) col = 2'd0;
    else if (pc < HW'(COL_B2)) col = 2'd1;
    else if (pc < HW'(COL_B3)) col = 2'd2;
    else                       col = 2'd3;

    if      (lc < VW'(ROW_B1)) row = 2'd0;
    else if (lc < VW'(ROW_B2)) row = 2'd1;
    else if (lc < VW'(ROW_B3)) row = 2'd2;
    else                       row = 2'd3;

    unique case ({row, col})
      4'h0: color_c = PIX_RED;    4'h1: color_c = PIX_GREEN;
      4'h2: color_c = PIX_BLUE;   4'h3: color_c = PIX_CYAN;
      4'h4: color_c = PIX_BLUE;   4'h5: color_c = PIX_CYAN;
      4'h6: color_c = PIX_RED;    4'h7: color_c = PIX_GREEN;
      4'h8: color_c = PIX_GREEN;  4'h9: color_c = PIX_BLUE;
      4'hA: color_c = PIX_CYAN;   4'hB: color_c = PIX_RED;
      4'hC: color_c = PIX_CYAN;   4'hD: color_c = PIX_RED;
      4'hE: color_c = PIX_GREEN;  4'hF: color_c = PIX_CYAN;
      default: color_c = PIX_BLACK;
    endcase
    if (!de_c) color_c = PIX_BLACK;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pixel_cnt <= '0;
      line_cnt  <= '0;
      hsync     <= 1'b0;
      vsync     <= 1'b0;
      de        <= 1'b0;
      for (int i = 0; i < PIX_PER_CLK; i++) pixels[i] <= PIX_BLACK;
    end else begin
      pixel_cnt <= pc;
      line_cnt  <= lc;
      hsync     <= hs_c;
      vsync     <= vs_c;
      de        <= de_c;
      for (int i = 0; i < PIX_PER_CLK; i++) pixels[i] <= color_c;
    end
  end

endmodule
