// Simple dual-port block RAM, written as an array so that synthesis maps it
// onto one 36 Kbit FPGA block RAM: 480 words of 60 bits (two 30-bit pixels),
// i.e. 960 pixels, 28,800 of the 36,864 bits.
//
// Interface: one write port (we, waddr, wdata) and one read port (raddr,
// rdata) on the same clock. A write takes effect at the rising edge; rdata
// is registered and shows the word at raddr one clock after raddr is
// presented (read latency 1). Reading and writing the same address in one
// cycle returns the old word. The RAM has no reset; its contents are
// undefined until written.
//
// The 36 Kbit size and the 960 pixels per RAM follow the document; the
// 480 x 60 shape is this design's choice.
module block_ram #(
  parameter int unsigned WIDTH = 60,
  parameter int unsigned DEPTH = 480,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
