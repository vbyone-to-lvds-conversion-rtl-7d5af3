// Self-checking testbench for sync_colorbar_gen at its default (full) size.
//
// Runs one complete 4400 x 2250 frame (550 x 2250 clocks) plus a few lines of
// the next and compares every output, every clock, with a reference worked
// out here from a plain clock counter: expected pixel and line counts,
// hsync on counts 23..32, vsync on lines 3..12, de on counts 70..549 of lines
// 90..2249, and the colour grid of the 4 x 4 bars. It also checks the frame
// period (1,237,500 clocks = 60 Hz at 74.25 MHz), the active clocks per
// frame (480 x 2160) and that all four colours appear.
module tb_sync_colorbar_gen;
  import vbo_lvds_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [9:0]  pixel_cnt;
  logic [11:0] line_cnt;
  logic hsync, vsync, de;
  pixel_t pixels [PIX_PER_CLK];

  sync_colorbar_gen dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic pixel_t ref_color(int h, int v);
    int row, col;
    pixel_t grid [4][4] = '{
      '{PIX_RED,   PIX_GREEN, PIX_BLUE,  PIX_CYAN},
      '{PIX_BLUE,  PIX_CYAN,  PIX_RED,   PIX_GREEN},
      '{PIX_GREEN, PIX_BLUE,  PIX_CYAN,  PIX_RED},
      '{PIX_CYAN,  PIX_RED,   PIX_GREEN, PIX_CYAN}};
    if (h < 70 || v < 90) return PIX_BLACK;
    col = (h < 190) ? 0 : (h < 310) ? 1 : (h < 430) ? 2 : 3;
    row = (v < 630) ? 0 : (v < 1170) ? 1 : (v < 1710) ? 2 : 3;
    return grid[row][col];
  endfunction

  localparam longint FRAME = 550 * 2250;
  longint n = 0;
  longint de_count = 0, hs_count = 0, vs_count = 0;
  int color_seen [4];
  int first_frame_start = -1, second_frame_start = -1;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    forever begin
      @(posedge clk);
      #1;
      begin
        int h, v;
        bit row_ok;
        pixel_t exp;
        h = int'(n % 550);
        v = int'((n / 550) % 2250);
        exp = ref_color(h, v);
        check(pixel_cnt === 10'(h) && line_cnt === 12'(v), "counters");
        check(hsync === (h > 22 && h < 33), "hsync");
        check(vsync === (v > 2 && v < 13), "vsync");
        check(de === (h >= 70 && v >= 90), "de");
        row_ok = 1;
        for (int i = 0; i < PIX_PER_CLK; i++) if (pixels[i] !== exp) row_ok = 0;
        check(row_ok, "pixels");
        if (n < FRAME) begin
          de_count += de;
          hs_count += hsync;
          vs_count += vsync;
          if (pixels[0] === PIX_RED)   color_seen[0]++;
          if (pixels[0] === PIX_GREEN) color_seen[1]++;
          if (pixels[0] === PIX_BLUE)  color_seen[2]++;
          if (pixels[0] === PIX_CYAN)  color_seen[3]++;
        end
        if (pixel_cnt == 0 && line_cnt == 0) begin
          if (first_frame_start < 0) first_frame_start = int'(n);
          else if (second_frame_start < 0) second_frame_start = int'(n);
        end
      end
      n++;
      if (n == FRAME + 2000) begin
        check(second_frame_start - first_frame_start == 1237500, "frame period");
        check(de_count == 480 * 2160, "active clocks per frame");
        check(hs_count == 10 * 2250, "hsync clocks per frame");
        check(vs_count == 10 * 550, "vsync clocks per frame");
        // bar areas in clocks: rows of 540 lines, columns of 120 clocks
        check(color_seen[0] == 4 * 540 * 120, "red area");
        check(color_seen[1] == 4 * 540 * 120, "green area");
        check(color_seen[2] == 3 * 540 * 120, "blue area");
        check(color_seen[3] == 5 * 540 * 120, "cyan area");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (FRAME + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
