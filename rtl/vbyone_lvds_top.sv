// V-by-One to LVDS colour-bar video system, top level.
//
// Two halves stand side by side, as on the bench they sit on two FPGA
// boards joined by a V-by-One HS link:
//
//  * Source (src_*): the colour-bar generator produces a 3840 x 2160, 60 Hz
//    raster, 8 pixels of 30 bits per 74.25 MHz clock, with active-high hsync,
//    vsync and data enable. On the bench this goes out as LVDS to an external
//    LVDS-to-V-by-One transmitter chip.
//  * Receiver (rx_* in, lvds_* out): video recovered from the V-by-One link
//    (by a receiver that is not part of this RTL) enters a ping-pong line
//    buffer of 8 block RAMs and then 8 LVDS ports, one per pixel of the
//    clock, each with 5 data lines and 1 clock line serialized 7:1 at the
//    7x high-frequency clock. The 8 ports drive the panel's 8 LVDS inputs.
//
// Nothing in this RTL models the V-by-One link itself; a testbench closes
// the loop by wiring src_* to rx_* on the same clock.
//
// Clocks and reset: src_clk clocks the source; pix_clk (74.25 MHz) and
// ser_clk (7x pix_clk, rising edges aligned) clock the receiver; both come
// from clock managers outside this RTL. src_rst and rst are synchronous,
// active high.
//
// Timing: rx_* to out_hsync/out_vsync/out_de is one pix_clk; the pixels of
// line N leave on the LVDS lines during line N+1 (see
// pingpong_line_buffer), a further two pix_clk and one ser_clk later
// (output register of the line buffer path into the serializers).
//
// Structure and counts (8 ports x (5 + 1) lines, 8 block RAMs, the timing
// numbers) follow the document; the split into these ports is this
// design's own.
module vbyone_lvds_top
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
  parameter int unsigned ROW_B3      = 1710
) (
  // source board: colour-bar generator
  input  logic   src_clk,
  input  logic   src_rst,
  output logic   src_hsync,
  output logic   src_vsync,
  output logic   src_de,
  output pixel_t src_pixels [PIX_PER_CLK],
  output logic [$clog2(H_TOTAL)-1:0] src_pixel_cnt,   // raster position of src_*
  output logic [$clog2(V_TOTAL)-1:0] src_line_cnt,

  // receiving board
  input  logic   pix_clk,
  input  logic   ser_clk,
  input  logic   rst,
  input  logic   rx_hsync,
  input  logic   rx_vsync,
  input  logic   rx_de,
  input  pixel_t rx_pixels [PIX_PER_CLK],
  output logic   out_hsync,
  output logic   out_vsync,
  output logic   out_de,
  output logic   olb,
  output logic   wr_bank,
  output logic [LVDS_LANES-1:0] lvds_data [PIX_PER_CLK],
  output logic                  lvds_clk  [PIX_PER_CLK]
);

  localparam int unsigned LINE_WORDS = H_TOTAL - H_ACT_START;

  // ---------------- source ----------------
  sync_colorbar_gen #(
    .H_TOTAL(H_TOTAL), .H_ACT_START(H_ACT_START),
    .HS_AFTER(HS_AFTER), .HS_BEFORE(HS_BEFORE),
    .V_TOTAL(V_TOTAL), .V_ACT_START(V_ACT_START),
    .VS_AFTER(VS_AFTER), .VS_BEFORE(VS_BEFORE),
    .COL_B1(COL_B1), .COL_B2(COL_B2), .COL_B3(COL_B3),
    .ROW_B1(ROW_B1), .ROW_B2(ROW_B2), .ROW_B3(ROW_B3)
  ) u_gen (
    .clk      (src_clk),
    .rst      (src_rst),
    .pixel_cnt(src_pixel_cnt),
    .line_cnt (src_line_cnt),
    .hsync    (src_hsync),
    .vsync    (src_vsync),
    .de       (src_de),
    .pixels   (src_pixels)
  );

  // ---------------- receiver: line buffer ----------------
  pixel_t lb_pixels [PIX_PER_CLK];

  pingpong_line_buffer #(
    .LINE_WORDS    (LINE_WORDS),
    .BRAMS_PER_BANK(4)
  ) u_linebuf (
    .clk       (pix_clk),
    .rst       (rst),
    .in_hsync  (rx_hsync),
    .in_vsync  (rx_vsync),
    .in_de     (rx_de),
    .in_pixels (rx_pixels),
    .out_hsync (out_hsync),
    .out_vsync (out_vsync),
    .out_de    (out_de),
    .out_pixels(lb_pixels),
    .olb       (olb),
    .wr_bank   (wr_bank)
  );

  // ---------------- receiver: 8 LVDS ports ----------------
  for (genvar p = 0; p < PIX_PER_CLK; p++) begin : g_port
    lvds_port u_port (
      .pix_clk (pix_clk),
      .ser_clk (ser_clk),
      .rst     (rst),
      .pixel   (lb_pixels[p]),
      .lanes   (lvds_data[p]),
      .clk_line(lvds_clk[p])
    );
  end

endmodule
