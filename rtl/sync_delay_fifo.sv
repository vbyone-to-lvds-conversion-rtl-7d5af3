// Sync delay FIFO: carries hsync, vsync and data enable through a shift
// register of DEPTH stages so that they arrive together with the data read
// from the line-buffer block RAMs (one clock of read latency by default).
//
// Interface: din is sampled on every rising clk edge and appears on dout
// DEPTH clocks later. rst is synchronous and empties the FIFO to zeros, so
// no sync pulse or enable is produced until real input has passed through.
// The document delays hsync and data enable by one clock through a FIFO;
// the parameterised depth and width are this design's choice.
module sync_delay_fifo #(
  parameter int unsigned WIDTH = 3,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[DEPTH-1];

endmodule
