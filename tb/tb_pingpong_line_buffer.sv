// Self-checking testbench for pingpong_line_buffer at a reduced line length.
//
// LINE_WORDS is 16 (instead of 480) so a frame is short: lines of 24 clocks
// with hsync on clocks 1..3 and de on clocks 8..23, frames of 10 lines with
// vsync on line 0 and de on lines 3..9. Every active clock carries 8 random
// pixels. A reference model here keeps the previous active line and
// predicts, for every clock, the delayed hsync/vsync/de (one clock), the
// olb flag and the output pixels: the pixel written one line earlier at the
// same position, or black on the first active line of a frame and outside
// de. Three frames are run. The testbench counts bank swaps, lines shown
// with olb high and with olb low, and writes to each bank, and fails if any
// of these never happened.
module tb_pingpong_line_buffer;
  import vbo_lvds_pkg::*;
  localparam int LW = 16, HT = 24, HA = 8, VT = 10, VA = 3;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_hsync, in_vsync, in_de;
  pixel_t in_pixels [PIX_PER_CLK];
  logic out_hsync, out_vsync, out_de, olb, wr_bank;
  pixel_t out_pixels [PIX_PER_CLK];

  pingpong_line_buffer #(.LINE_WORDS(LW), .BRAMS_PER_BANK(4)) dut (.*);

  int checks = 0, failures = 0;
  pixel_t cur_line  [LW][PIX_PER_CLK];
  pixel_t prev_line [LW][PIX_PER_CLK];
  bit cur_has, prev_valid;
  int swaps = 0, olb_lines = 0, black_lines = 0, bank_writes [2];
  logic wr_bank_q;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    in_hsync = 0; in_vsync = 0; in_de = 0;
    for (int i = 0; i < PIX_PER_CLK; i++) in_pixels[i] = '0;
    cur_has = 0; prev_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wr_bank_q = wr_bank;
    for (int f = 0; f < 3; f++)
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          bit de;
          pixel_t expv [PIX_PER_CLK];
          if (h == 0) begin
            if (cur_has) begin prev_line = cur_line; prev_valid = 1; end
            else prev_valid = 0;
            cur_has = 0;
          end
          de = (h >= HA) && (v >= VA);
          in_hsync = (h >= 1 && h <= 3);
          in_vsync = (v == 0);
          in_de    = de;
          for (int i = 0; i < PIX_PER_CLK; i++) begin
            in_pixels[i] = de ? pixel_t'($urandom) : PIX_BLACK;
            expv[i] = (de && prev_valid) ? prev_line[h-HA][i] : PIX_BLACK;
          end
          if (de) begin
            for (int i = 0; i < PIX_PER_CLK; i++) cur_line[h-HA][i] = in_pixels[i];
            cur_has = 1;
            bank_writes[wr_bank]++;
          end
          @(posedge clk);
          #1;
          check(out_hsync === in_hsync && out_vsync === in_vsync && out_de === in_de,
                "delayed sync");
          if (de) begin
            automatic bit ok = 1;
            for (int i = 0; i < PIX_PER_CLK; i++) if (out_pixels[i] !== expv[i]) ok = 0;
            check(ok, "pixels");
            check(olb === prev_valid, "olb");
            if (h == HA) begin
              if (prev_valid) olb_lines++; else black_lines++;
            end
          end else begin
            automatic bit ok = 1;
            for (int i = 0; i < PIX_PER_CLK; i++) if (out_pixels[i] !== PIX_BLACK) ok = 0;
            check(ok, "black outside de");
          end
          if (wr_bank !== wr_bank_q) swaps++;
          wr_bank_q = wr_bank;
        end
    // 3 frames x 7 active lines: a swap after each (the last one falls after
    // the run), 6 lines shown per
    // frame, the first active line of each frame black
    check(swaps == 3 * (VT - VA) - 1, "swap count");
    check(olb_lines == 3 * (VT - VA - 1), "lines shown");
    check(black_lines == 3, "first active lines black");
    check(bank_writes[0] > 0 && bank_writes[1] > 0, "both banks written");
    $display("swaps=%0d shown=%0d black=%0d writes=%0d/%0d", swaps, olb_lines,
             black_lines, bank_writes[0], bank_writes[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * VT * HT + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
