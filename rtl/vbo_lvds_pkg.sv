// Shared types and constants of the V-by-One to LVDS colour-bar video path.
//
// A pixel is 30 bits: three 10-bit primaries, red in the top bits. Every
// pixel clock carries PIX_PER_CLK pixels side by side (pixel 0 is the
// leftmost), so the 594 MHz pixel rate of a 4400 x 2250 x 60 Hz raster runs
// at 74.25 MHz. The four bar colours are full-scale primaries; cyan is green
// plus blue. The pixel layout (red on top) and the colour codes are this
// design's choice; the pixel width, the pixels per clock and the colour set
// follow the document.
package vbo_lvds_pkg;

  localparam int unsigned COLOR_BITS  = 10;
  localparam int unsigned PIXEL_BITS  = 3 * COLOR_BITS;   // 30
  localparam int unsigned PIX_PER_CLK = 8;
  localparam int unsigned LVDS_LANES  = 5;                // data lines per port
  localparam int unsigned LVDS_BITS   = 7;                // bits per line per pixel clock

  typedef struct packed {
    logic [COLOR_BITS-1:0] r;
    logic [COLOR_BITS-1:0] g;
    logic [COLOR_BITS-1:0] b;
  } pixel_t;

  localparam logic [COLOR_BITS-1:0] FULL = '1;

  localparam pixel_t PIX_BLACK = '{r: '0,   g: '0,   b: '0};
  localparam pixel_t PIX_RED   = '{r: FULL, g: '0,   b: '0};
  localparam pixel_t PIX_GREEN = '{r: '0,   g: FULL, b: '0};
  localparam pixel_t PIX_BLUE  = '{r: '0,   g: '0,   b: FULL};
  localparam pixel_t PIX_CYAN  = '{r: '0,   g: FULL, b: FULL};

  // Repeating 7-bit word sent on the clock line of every LVDS port.
  localparam logic [LVDS_BITS-1:0] LVDS_CLK_PATTERN = 7'b1100011;

endpackage
