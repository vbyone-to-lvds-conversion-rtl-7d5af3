// 7:1 output serializer for one LVDS line.
//
// A 7-bit word is taken every pixel clock (pix_clk) and shifted out, most
// significant bit first, on sout at the high-frequency clock ser_clk, which
// must run at exactly 7x pix_clk with its rising edges phase aligned to
// those of pix_clk (as a clock manager provides them).
//
// How it works: in the pix_clk domain the word is registered and a toggle
// bit flips every cycle. The ser_clk domain keeps the previous value of the
// toggle; the first ser_clk edge after a pix_clk edge sees the two differ
// and loads the word into a shift register, and the next six edges shift
// it. Because the clocks are related and aligned this is a synchronous
// transfer, not an asynchronous crossing.
//
// Timing: a word presented on din before pix_clk edge k is registered at
// edge k, loaded at the ser_clk edge that follows it, and its seven bits
// appear on sout (registered) during the following seven ser_clk cycles:
// bit 6 first, bit 0 last. rst is synchronous to each clock, active high,
// and must be held for at least one pix_clk cycle; sout is 0 during reset.
//
// The document serializes 7 parallel bits onto one line with a vendor
// serializer primitive fed by a pixel clock and a phase-aligned fast clock;
// this module does the same in plain logic. Bit order, the single-data-rate
// fast clock and the toggle-based load are this design's choices.
module oserdes_7to1 #(
  parameter int unsigned BITS = 7
) (
  input  logic            pix_clk,
  input  logic            ser_clk,
  input  logic            rst,
  input  logic [BITS-1:0] din,
  output logic            sout
);

  // pix_clk domain
  logic [BITS-1:0] word_q;
  logic            tog_pix;

  always_ff @(posedge pix_clk) begin
    if (rst) begin
      word_q  <= '0;
      tog_pix <= 1'b0;
    end else begin
      word_q  <= din;
      tog_pix <= ~tog_pix;
    end
  end

  // ser_clk domain
  logic            tog_seen;
  logic [BITS-1:0] shreg;

  always_ff @(posedge ser_clk) begin
    if (rst) begin
      tog_seen <= 1'b0;
      shreg    <= '0;
      sout     <= 1'b0;
    end else begin
      tog_seen <= tog_pix;
      if (tog_pix != tog_seen) shreg <= word_q;
      else                     shreg <= {shreg[BITS-2:0], 1'b0};
      sout <= (tog_pix != tog_seen) ? word_q[BITS-1] : shreg[BITS-2];
    end
  end

endmodule
