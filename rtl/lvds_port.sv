// One LVDS port of the panel: five data lines and one clock line.
//
// Each pixel clock the 30-bit pixel is extended to 35 bits, the top five
// bits unused and sent as 0, and cut into five 7-bit words: data line k
// carries bits 7k+6 .. 7k of
//     { 5'b0, red[9:0], green[9:0], blue[9:0] }
// so line 0 holds blue[6:0] and line 4 holds {5'b0, red[9:8]}. Six 7:1
// serializers send the five words and, on the clock line, the fixed word
// 1100011, all MSB first at the 7x high-frequency clock.
//
// Interface: pixel is sampled at each pix_clk rising edge. ser_clk must be
// 7x pix_clk with aligned rising edges. lanes[k] and clk_line are the
// serial, single-ended values that a differential output buffer would
// drive. Timing as in oserdes_7to1: all six lines start a new word at the
// same ser_clk edge, so the clock-line word frames the data words.
//
// Five data lines plus one clock line per port, 7 bits per line and five
// unused bits out of 35 follow the document. The bit mapping and the clock
// word are this design's choices; the document gives neither.
module lvds_port
  import vbo_lvds_pkg::*;
(
  input  logic                  pix_clk,
  input  logic                  ser_clk,
  input  logic                  rst,
  input  pixel_t                pixel,
  output logic [LVDS_LANES-1:0] lanes,
  output logic                  clk_line
);

  localparam int unsigned WORD_BITS = LVDS_LANES * LVDS_BITS;   // 35

  logic [WORD_BITS-1:0] word;
  assign word = {(WORD_BITS - PIXEL_BITS)'(0), pixel};

  for (genvar k = 0; k < LVDS_LANES; k++) begin : g_lane
    oserdes_7to1 #(.BITS(LVDS_BITS)) u_ser (
      .pix_clk(pix_clk),
      .ser_clk(ser_clk),
      .rst    (rst),
      .din    (word[k*LVDS_BITS +: LVDS_BITS]),
      .sout   (lanes[k])
    );
  end

  oserdes_7to1 #(.BITS(LVDS_BITS)) u_ser_clk (
    .pix_clk(pix_clk),
    .ser_clk(ser_clk),
    .rst    (rst),
    .din    (LVDS_CLK_PATTERN),
    .sout   (clk_line)
  );

endmodule
