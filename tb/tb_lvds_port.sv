// Self-checking testbench for lvds_port.
//
// Feeds a random 30-bit pixel every pixel clock (ser_clk = 7x, aligned) and
// decodes the six serial lines with a behavioural LVDS receiver that frames
// words on the clock line's 1100011 word. Each decoded pixel must equal the
// pixels sent, in order, and the five spare bits must be zero. It also checks
// the bit mapping directly on a known pixel (line 0 must carry blue[6:0],
// line 4 {00000, red[9:8]}) and that one word arrives per pixel clock.
module tb_lvds_port;
  import vbo_lvds_pkg::*;
  logic pix_clk = 0, ser_clk = 0, rst = 1;
  initial forever begin
    for (int i = 0; i < 7; i++) begin
      if (i == 0) pix_clk = 1;
      if (i == 3) pix_clk = 0;
      ser_clk = 1; #5;
      ser_clk = 0; #5;
    end
  end

  pixel_t pixel;
  logic [LVDS_LANES-1:0] lanes;
  logic clk_line;
  lvds_port dut (.*);

  logic word_valid;
  pixel_t rx_pixel;
  logic [4:0] spare;
  lvds_rx_model rx (.ser_clk, .lanes, .clk_line, .word_valid, .pixel(rx_pixel), .spare);

  int checks = 0, failures = 0;
  pixel_t sent [$];
  int words = 0, pix_edges = 0;
  localparam pixel_t KNOWN = '{r: 10'h2A5, g: 10'h13C, b: 10'h0F1};

  initial begin
    pixel = '0;
    repeat (3) @(posedge pix_clk);
    #1 rst = 0;
    forever begin
      @(posedge pix_clk);
      sent.push_back(pixel);
      pix_edges++;
      #1 pixel = (pix_edges == 50) ? KNOWN : pixel_t'($urandom);
    end
  end

  // direct look at two lines while KNOWN is on the wire
  logic [6:0] line0_bits, line4_bits;
  always @(posedge ser_clk) begin
    line0_bits <= {line0_bits[5:0], lanes[0]};
    line4_bits <= {line4_bits[5:0], lanes[4]};
  end

  always @(posedge ser_clk) if (!rst && word_valid) begin
    checks++;
    if (sent.size() == 0 || rx_pixel !== sent[0] || spare !== 5'b0) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d got %h", words, rx_pixel);
    end
    if (sent.size() && sent[0] === KNOWN) begin
      checks++;
      if (line0_bits !== KNOWN.b[6:0] || line4_bits !== {5'b0, KNOWN.r[9:8]}) begin
        failures++;
        $display("FAIL mapping %b %b", line0_bits, line4_bits);
      end
    end
    if (sent.size()) void'(sent.pop_front());
    words++;
    if (words == 400) begin
      checks++;
      if (pix_edges - words > 2 || pix_edges < words) begin
        failures++; $display("FAIL rate %0d edges %0d words", pix_edges, words);
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
