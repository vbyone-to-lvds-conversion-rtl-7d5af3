// Ping-pong line buffer between the received video and the LVDS outputs.
//
// Two banks of BRAMS_PER_BANK block RAMs each (8 RAMs in all) hold one
// active line per bank: LINE_WORDS clocks of PIX_PER_CLK pixels, i.e.
// 480 x 8 = 3840 pixels, 960 pixels per RAM. Each RAM of a bank stores
// PIX_PER_CLK/BRAMS_PER_BANK neighbouring pixels of every clock (pixels 0-1
// in RAM 0, 2-3 in RAM 1, ...), so a whole clock's 8 pixels are written and
// read in one cycle.
//
// While in_de is high the incoming pixels are written into the write bank at
// an address that counts the clocks of de in the current line; at the same
// time, with the same address, the other bank is read. hsync, vsync and de
// go through a one-stage sync delay FIFO, so the delayed de lines up with
// the RAM read data (read latency 1). The rising edge of the delayed hsync
// is the reference for both sides: if a line was written since the last
// one, the banks swap and the output logic block flag (olb) goes high,
// meaning the bank now being read holds a complete line; otherwise (a
// blanking line) olb goes low. Out of the delayed de, or with olb low, the
// output pixels are black.
//
// Timing: out_hsync/out_vsync/out_de are the inputs delayed by one clock;
// out_pixels during out_de of line N are the pixels written during line
// N-1, at the same horizontal position. The first active line of a frame
// is therefore black and the last one is not shown: the picture moves down
// by one line. rst is synchronous, active high.
//
// The two banks of four 36 Kbit RAMs, 960 pixels per RAM, simultaneous read
// and write, swapping on hsync, the OLB flag and the one-clock FIFO on hsync
// and de follow the document. The address counter, the RAM shape, the
// black output when no full line is held and the delay of vsync along with
// hsync are this design's choices.
module pingpong_line_buffer
  import vbo_lvds_pkg::*;
#(
  parameter int unsigned LINE_WORDS     = 480,
  parameter int unsigned BRAMS_PER_BANK = 4,
  localparam int unsigned AW      = $clog2(LINE_WORDS),
  localparam int unsigned PIX_PER_RAM_WORD = PIX_PER_CLK / BRAMS_PER_BANK,
  localparam int unsigned RAM_W   = PIX_PER_RAM_WORD * PIXEL_BITS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_hsync,
  input  logic   in_vsync,
  input  logic   in_de,
  input  pixel_t in_pixels [PIX_PER_CLK],
  output logic   out_hsync,
  output logic   out_vsync,
  output logic   out_de,
  output pixel_t out_pixels [PIX_PER_CLK],
  output logic   olb,       // bank being read holds a complete line
  output logic   wr_bank    // bank being written (0 or 1)
);

  // ---------------- sync delay FIFO ----------------
  logic [2:0] sync_d;
  sync_delay_fifo #(.WIDTH(3), .DEPTH(1)) u_sync_fifo (
    .clk (clk),
    .rst (rst),
    .din ({in_hsync, in_vsync, in_de}),
    .dout(sync_d)
  );
  assign {out_hsync, out_vsync, out_de} = sync_d;

  // ---------------- address and bank control ----------------
  logic [AW:0] wcnt;          // one bit wider than needed to catch overrun
  logic        hs_d_prev;
  logic        line_written;
  logic        rd_bank_q;
  logic        we;

  assign we = in_de && (wcnt < (AW+1)'(LINE_WORDS));

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt         <= '0;
      hs_d_prev    <= 1'b0;
      line_written <= 1'b0;
      wr_bank      <= 1'b0;
      olb          <= 1'b0;
      rd_bank_q    <= 1'b1;
    end else begin
      wcnt      <= in_de ? wcnt + 1'b1 : '0;
      hs_d_prev <= out_hsync;
      rd_bank_q <= ~wr_bank;
      if (out_hsync && !hs_d_prev) begin
        if (line_written) begin
          wr_bank <= ~wr_bank;
          olb     <= 1'b1;
        end else begin
          olb     <= 1'b0;
        end
        line_written <= 1'b0;
      end else if (we) begin
        line_written <= 1'b1;
      end
    end
  end

  // ---------------- the 2 x BRAMS_PER_BANK block RAMs ----------------
  logic [RAM_W-1:0] rdata [2][BRAMS_PER_BANK];

  for (genvar bk = 0; bk < 2; bk++) begin : g_bank
    for (genvar r = 0; r < BRAMS_PER_BANK; r++) begin : g_ram
      logic [RAM_W-1:0] wdata;
      always_comb
        for (int p = 0; p < PIX_PER_RAM_WORD; p++)
          wdata[p*PIXEL_BITS +: PIXEL_BITS] = in_pixels[r*PIX_PER_RAM_WORD + p];

      block_ram #(.WIDTH(RAM_W), .DEPTH(LINE_WORDS)) u_ram (
        .clk  (clk),
        .we   (we && (wr_bank == 1'(bk))),
        .waddr(wcnt[AW-1:0]),
        .wdata(wdata),
        .raddr(wcnt[AW-1:0]),
        .rdata(rdata[bk][r])
      );
    end
  end

  // ---------------- output logic ----------------
  always_comb begin
    for (int r = 0; r < BRAMS_PER_BANK; r++)
      for (int p = 0; p < PIX_PER_RAM_WORD; p++)
        out_pixels[r*PIX_PER_RAM_WORD + p] = (out_de && olb)
            ? pixel_t'(rdata[rd_bank_q][r][p*PIXEL_BITS +: PIXEL_BITS])
            : PIX_BLACK;
  end

  // A line must not carry more active clocks than a bank holds.
  a_line_fits: assert property (@(posedge clk) disable iff (rst)
      in_de |-> wcnt < (AW+1)'(LINE_WORDS))
    else $error("line longer than %0d clocks", LINE_WORDS);

endmodule
