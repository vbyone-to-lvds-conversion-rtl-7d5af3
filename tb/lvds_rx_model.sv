// Behavioural LVDS receiver for testbenches (not synthesizable by intent).
//
// Samples the clock line and the five data lines of one port at every
// rising edge of the 7x serial clock and keeps the last seven bits of each.
// When the clock-line history equals the 7-bit clock word 1100011 a complete
// word has arrived: the five 7-bit data words are reassembled into the
// 35-bit port word, its low 30 bits are returned as a pixel and its top five
// bits separately, and word_valid pulses for one serial clock. The expected
// mapping is data line k = bits 7k+6..7k, MSB sent first.
module lvds_rx_model
  import vbo_lvds_pkg::*;
(
  input  logic                  ser_clk,
  input  logic [LVDS_LANES-1:0] lanes,
  input  logic                  clk_line,
  output logic                  word_valid,
  output pixel_t                pixel,
  output logic [4:0]            spare
);
  logic [6:0] hist_clk = '0;
  logic [6:0] hist [LVDS_LANES];
  initial begin
    for (int k = 0; k < LVDS_LANES; k++) hist[k] = '0;
    word_valid = 0;
    pixel = '0;
    spare = '0;
  end

  always @(posedge ser_clk) begin
    logic [6:0] nclk;
    logic [6:0] nh [LVDS_LANES];
    logic [34:0] w;
    nclk = {hist_clk[5:0], clk_line};
    for (int k = 0; k < LVDS_LANES; k++) nh[k] = {hist[k][5:0], lanes[k]};
    hist_clk <= nclk;
    for (int k = 0; k < LVDS_LANES; k++) hist[k] <= nh[k];
    if (nclk == LVDS_CLK_PATTERN) begin
      for (int k = 0; k < LVDS_LANES; k++) w[k*7 +: 7] = nh[k];
      pixel      <= pixel_t'(w[29:0]);
      spare      <= w[34:30];
      word_valid <= 1'b1;
    end else begin
      word_valid <= 1'b0;
    end
  end
endmodule
