// Self-checking testbench for oserdes_7to1.
//
// pix_clk has a 70 ns period and ser_clk a 10 ns one, rising together. A
// random 7-bit word is applied every pixel clock; the serial output is
// collected bit by bit at ser_clk and every group of seven bits, MSB first,
// must equal the words in order. It also checks the rate: exactly seven
// serial bits per pixel clock, i.e. one word per pixel clock with no gaps,
// and the fixed latency from the pixel-clock edge that samples a word to
// the serial clock edge that presents its first bit (the next ser_clk edge).
module tb_oserdes_7to1;
  logic pix_clk = 0, ser_clk = 0, rst = 1;
  // one generator for both clocks keeps their edges aligned
  initial forever begin
    for (int i = 0; i < 7; i++) begin
      if (i == 0) pix_clk = 1;
      if (i == 3) pix_clk = 0;   // duty ~43%; only rising edges matter
      ser_clk = 1; #5;
      ser_clk = 0; #5;
    end
  end

  logic [6:0] din;
  logic sout;
  oserdes_7to1 dut (.*);

  int checks = 0, failures = 0;
  logic [6:0] sent [$];
  int ser_edges = 0;

  // drive: new word right after each pix_clk rising edge
  initial begin
    din = '0;
    repeat (3) @(posedge pix_clk);
    #1 rst = 0;
    forever begin
      @(posedge pix_clk);
      sent.push_back(din);     // the word sampled at this edge
      #1 din = 7'($urandom);
    end
  end

  // receive: bit 6 of a word is on sout right after the first ser_clk edge
  // that follows the pix_clk edge that sampled it
  int words = 0;
  initial begin
    logic [6:0] got;
    @(negedge rst);
    @(posedge pix_clk);        // first sampling edge after reset
    @(posedge ser_clk);        // load edge: sout now shows bit 6 of word 0
    forever begin
      for (int b = 6; b >= 0; b--) begin
        #1 got[b] = sout;
        @(posedge ser_clk);
      end
      checks++;
      if (sent.size() == 0 || got !== sent[0]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d got %b exp %b", words, got,
                                    sent.size() ? sent[0] : 7'bx);
      end
      if (sent.size()) void'(sent.pop_front());
      words++;
      if (words == 300) begin
        // 300 words took exactly 300 pixel clocks: the queue never grows
        checks++;
        if (sent.size() > 2) begin failures++; $display("FAIL rate: backlog %0d", sent.size()); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
