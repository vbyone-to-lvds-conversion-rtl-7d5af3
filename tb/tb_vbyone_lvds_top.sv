// End-to-end testbench for vbyone_lvds_top at its default (full) size.
//
// The source half's colour bars are looped straight into the receiver half
// (standing in for the V-by-One link) with src_clk = pix_clk. pix_clk is
// 74.25 MHz (13.468 ns) and ser_clk 7x that (1.924 ns), rising edges
// aligned. Eight behavioural LVDS receivers decode the 8 ports.
//
// The run covers one whole 3840 x 2160 frame and the first 100 lines of the
// next. A reference computed here from a plain clock counter predicts every
// decoded pixel: during active video of line v the bar colour of line v-1
// (the ping-pong buffer shows the previous line), black on the first active
// line of a frame and in blanking. The delayed hsync/vsync/de are checked
// every clock too. Mechanisms counted, each of which must happen: bank
// swaps, active lines sent with olb high, active lines sent black with olb
// low, output hsync and vsync pulses, every bar colour arriving on the LVDS
// lines, and the wrap into a second frame.
module tb_vbyone_lvds_top;
  import vbo_lvds_pkg::*;

  localparam longint H_TOTAL = 550, V_TOTAL = 2250, H_ACT = 70, V_ACT = 90;
  localparam longint RUN = longint'(H_TOTAL) * (V_TOTAL + 100);

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
  logic [9:0]  src_pixel_cnt;
  logic [11:0] src_line_cnt;
  logic   out_hsync, out_vsync, out_de, olb, wr_bank;
  logic [LVDS_LANES-1:0] lvds_data [PIX_PER_CLK];
  logic                  lvds_clk  [PIX_PER_CLK];

  vbyone_lvds_top dut (
    .src_clk(pix_clk), .src_rst(rst),
    .src_hsync, .src_vsync, .src_de, .src_pixels, .src_pixel_cnt, .src_line_cnt,
    .pix_clk, .ser_clk, .rst,
    .rx_hsync(src_hsync), .rx_vsync(src_vsync), .rx_de(src_de), .rx_pixels(src_pixels),
    .out_hsync, .out_vsync, .out_de, .olb, .wr_bank,
    .lvds_data, .lvds_clk
  );

  logic   word_valid [PIX_PER_CLK];
  pixel_t rx_pixel   [PIX_PER_CLK];
  logic [4:0] spare  [PIX_PER_CLK];
  for (genvar p = 0; p < PIX_PER_CLK; p++) begin : g_rx
    lvds_rx_model u_rx (.ser_clk, .lanes(lvds_data[p]), .clk_line(lvds_clk[p]),
                        .word_valid(word_valid[p]), .pixel(rx_pixel[p]), .spare(spare[p]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic pixel_t bar(int h, int v);
    int row, col;
    pixel_t grid [4][4] = '{
      '{PIX_RED,   PIX_GREEN, PIX_BLUE,  PIX_CYAN},
      '{PIX_BLUE,  PIX_CYAN,  PIX_RED,   PIX_GREEN},
      '{PIX_GREEN, PIX_BLUE,  PIX_CYAN,  PIX_RED},
      '{PIX_CYAN,  PIX_RED,   PIX_GREEN, PIX_CYAN}};
    col = (h < 190) ? 0 : (h < 310) ? 1 : (h < 430) ? 2 : 3;
    row = (v < 630) ? 0 : (v < 1170) ? 1 : (v < 1710) ? 2 : 3;
    return grid[row][col];
  endfunction

  // expected line-buffer output for raster position n (clock count from reset);
  // lines shown from a full bank: 91..2249 of frame 1, 91..99 of frame 2
  function automatic pixel_t expected(longint n);
    int h, v;
    if (n < 0) return PIX_BLACK;
    h = int'(n % H_TOTAL);
    v = int'((n / H_TOTAL) % V_TOTAL);
    if (h < H_ACT || v < V_ACT + 1) return PIX_BLACK;
    return bar(h, v - 1);
  endfunction

  // mechanism counters
  int swaps = 0, lines_olb = 0, lines_black = 0, hs_pulses = 0, vs_pulses = 0;
  int color_seen [4];
  bit second_frame = 0;

  pixel_t exp_q [$];
  longint edge_no = 0;     // pix_clk edges since reset was released
  logic wr_bank_q = 0, hs_q = 0, vs_q = 0, de_q = 0;

  initial begin
    repeat (3) @(posedge pix_clk);
    #0.5 rst = 0;
  end

  // pix_clk side: sync checks and the queue of expected words
  always @(posedge pix_clk) if (!rst) begin
    longint n;
    int h, v;
    edge_no++;
    // the word sampled at edge j shows raster position j-3
    exp_q.push_back(expected(edge_no - 3));
    // out_* seen at this edge (pre-edge values) show position edge_no-3:
    // generator register, then one clock of sync delay
    n = edge_no - 3;
    if (n >= 0) begin
      h = int'(n % H_TOTAL);
      v = int'((n / H_TOTAL) % V_TOTAL);
      check(out_hsync === (h > 22 && h < 33) && out_vsync === (v > 2 && v < 13)
            && out_de === (h >= H_ACT && v >= V_ACT), "delayed sync");
      if (out_de && h == H_ACT) begin
        if (olb) lines_olb++; else lines_black++;
      end
      if (n >= longint'(H_TOTAL) * V_TOTAL) second_frame = 1;
    end
    if (out_hsync && !hs_q) hs_pulses++;
    if (out_vsync && !vs_q) vs_pulses++;
    if (wr_bank !== wr_bank_q) swaps++;
    hs_q <= out_hsync; vs_q <= out_vsync; wr_bank_q <= wr_bank;
  end

  // serial side: every decoded word against the queue
  longint words = 0;
  always @(posedge ser_clk) if (!rst && word_valid[0]) begin
    pixel_t e;
    bit ok;
    e = (exp_q.size() > 0) ? exp_q.pop_front() : PIX_BLACK;
    ok = (exp_q.size() < 4);
    for (int p = 0; p < PIX_PER_CLK; p++)
      if (!word_valid[p] || rx_pixel[p] !== e || spare[p] !== 5'b0) ok = 0;
    check(ok, "LVDS word");
    if (rx_pixel[0] === PIX_RED)   color_seen[0]++;
    if (rx_pixel[0] === PIX_GREEN) color_seen[1]++;
    if (rx_pixel[0] === PIX_BLUE)  color_seen[2]++;
    if (rx_pixel[0] === PIX_CYAN)  color_seen[3]++;
    words++;
    if (words == RUN) begin
      check(swaps > 2000,          "bank swaps happened");
      check(lines_olb == 2159 + 9,  "lines sent from a full bank");
      check(lines_black == 2,       "first active line of each frame black");
      check(hs_pulses > 2250,       "output hsync pulses");
      check(vs_pulses == 2,         "output vsync pulses");
      check(color_seen[0] > 0 && color_seen[1] > 0 && color_seen[2] > 0
            && color_seen[3] > 0,   "all bar colours on LVDS");
      check(second_frame,           "second frame reached");
      $display("swaps=%0d olb_lines=%0d black_lines=%0d hs=%0d vs=%0d colours=%0d/%0d/%0d/%0d",
               swaps, lines_olb, lines_black, hs_pulses, vs_pulses,
               color_seen[0], color_seen[1], color_seen[2], color_seen[3]);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #((RUN + 5000) * 13.468);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
