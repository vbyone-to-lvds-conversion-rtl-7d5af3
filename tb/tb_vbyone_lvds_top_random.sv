// End-to-end testbench for the receiving half of vbyone_lvds_top with random
// pixels, at a reduced raster so it runs in well under a second.
//
// The colour bars give all 8 pixels of a clock the same value, so they
// cannot show whether each pixel reaches its own LVDS port. Here the rx_*
// inputs are driven directly with a small raster (lines of 40 clocks with
// de on clocks 10..39, frames of 12 lines with de on lines 3..11) and a
// different random value for every pixel. A reference model keeps the
// previous active line; the 8 behavioural LVDS receivers must decode, on
// port p, pixel p of the previous line at the same position (black on the
// first active line of a frame and in blanking), with one word per pixel
// clock. Three frames are run; bank swaps, lines sent with olb high and low
// are counted and each must have happened. The source half runs alongside
// at the same reduced size and is only checked for producing data enable.
module tb_vbyone_lvds_top_random;
  import vbo_lvds_pkg::*;
  localparam int HT = 40, HA = 10, VT = 12, VA = 3, LW = HT - HA, FRAMES = 3;

  logic pix_clk = 0, ser_clk = 0, rst = 1;
  initial forever begin
    for (int i = 0; i < 7; i++) begin
      if (i == 0) pix_clk = 1;
      if (i == 3) pix_clk = 0;
      ser_clk = 1; #0.962;
      ser_clk = 0; #0.962;
    end
  end

  logic   src_hsync, src_vsync, src_de;
  pixel_t src_pixels [PIX_PER_CLK];
  logic [5:0] src_pixel_cnt;
  logic [3:0] src_line_cnt;
  logic   rx_hsync, rx_vsync, rx_de;
  pixel_t rx_pixels [PIX_PER_CLK];
  logic   out_hsync, out_vsync, out_de, olb, wr_bank;
  logic [LVDS_LANES-1:0] lvds_data [PIX_PER_CLK];
  logic                  lvds_clk  [PIX_PER_CLK];

  vbyone_lvds_top #(
    .H_TOTAL(HT), .H_ACT_START(HA), .HS_AFTER(1), .HS_BEFORE(5),
    .V_TOTAL(VT), .V_ACT_START(VA), .VS_AFTER(0), .VS_BEFORE(2),
    .COL_B1(17), .COL_B2(24), .COL_B3(31), .ROW_B1(5), .ROW_B2(7), .ROW_B3(9)
  ) dut (
    .src_clk(pix_clk), .src_rst(rst),
    .src_hsync, .src_vsync, .src_de, .src_pixels, .src_pixel_cnt, .src_line_cnt,
    .pix_clk, .ser_clk, .rst,
    .rx_hsync, .rx_vsync, .rx_de, .rx_pixels,
    .out_hsync, .out_vsync, .out_de, .olb, .wr_bank,
    .lvds_data, .lvds_clk
  );

  logic   word_valid [PIX_PER_CLK];
  pixel_t rx_word    [PIX_PER_CLK];
  logic [4:0] spare  [PIX_PER_CLK];
  for (genvar p = 0; p < PIX_PER_CLK; p++) begin : g_rx
    lvds_rx_model u_rx (.ser_clk, .lanes(lvds_data[p]), .clk_line(lvds_clk[p]),
                        .word_valid(word_valid[p]), .pixel(rx_word[p]), .spare(spare[p]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  typedef pixel_t [PIX_PER_CLK-1:0] word_t;   // the 8 pixels of one clock
  word_t  cur_line [LW], prev_line [LW];
  bit     cur_has = 0, prev_valid = 0;
  word_t  cur_exp, pending;
  word_t  exp_q [$];
  int     swaps = 0, lines_olb = 0, lines_black = 0, src_active = 0;
  logic   wr_bank_q = 0;
  bit     done = 0;

  // input side
  initial begin
    rx_hsync = 0; rx_vsync = 0; rx_de = 0;
    for (int i = 0; i < PIX_PER_CLK; i++) rx_pixels[i] = PIX_BLACK;
    cur_exp = '0;
    pending = '0;
    repeat (3) @(posedge pix_clk);
    #0.1 rst = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          bit de;
          if (h == 0) begin
            if (cur_has) begin prev_line = cur_line; prev_valid = 1; end
            else prev_valid = 0;
            cur_has = 0;
          end
          de = (h >= HA) && (v >= VA);
          rx_hsync = (h >= 1 && h <= 4);
          rx_vsync = (v == 0);
          rx_de    = de;
          for (int i = 0; i < PIX_PER_CLK; i++) begin
            rx_pixels[i] = de ? pixel_t'($urandom) : PIX_BLACK;
            cur_exp[i]   = (de && prev_valid) ? prev_line[h-HA][i] : PIX_BLACK;
          end
          if (de) begin
            for (int i = 0; i < PIX_PER_CLK; i++) cur_line[h-HA][i] = rx_pixels[i];
            cur_has = 1;
            if (h == HA) begin if (prev_valid) lines_olb++; else lines_black++; end
          end
          @(posedge pix_clk);
          #0.1;
        end
    // let the last words drain through the serializers
    rx_de = 0; rx_hsync = 0; rx_vsync = 0;
    for (int i = 0; i < PIX_PER_CLK; i++) rx_pixels[i] = PIX_BLACK;
    cur_exp = '0;
    repeat (4) @(posedge pix_clk);
    done = 1;
  end

  // the word sampled by the serializers at edge j is the line-buffer output
  // for the input sampled at edge j-1
  always @(posedge pix_clk) if (!rst) begin
    exp_q.push_back(pending);
    pending = cur_exp;
    if (wr_bank !== wr_bank_q) swaps++;
    wr_bank_q <= wr_bank;
    if (src_de) src_active++;
  end

  int words = 0;
  always @(posedge ser_clk) if (!rst && word_valid[0]) begin
    bit ok;
    word_t e;
    ok = (exp_q.size() > 0) && (exp_q.size() < 4);
    e = '0;
    if (ok) e = exp_q.pop_front();
    for (int p = 0; p < PIX_PER_CLK; p++)
      if (!word_valid[p] || rx_word[p] !== e[p] || spare[p] !== 5'b0) ok = 0;
    check(ok, "LVDS word per port");
    words++;
  end

  initial begin
    wait (done);
    check(words >= FRAMES * VT * HT, "one word per pixel clock");
    check(swaps == FRAMES * (VT - VA) - 1, "bank swaps");
    check(lines_olb == FRAMES * (VT - VA - 1), "lines sent from a full bank");
    check(lines_black == FRAMES, "first active line of each frame black");
    check(src_active > 0, "source produced active video");
    $display("words=%0d swaps=%0d olb_lines=%0d black_lines=%0d", words, swaps,
             lines_olb, lines_black);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((FRAMES * VT * HT + 200) * 13.468);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
