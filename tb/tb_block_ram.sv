// Self-checking testbench for block_ram at its default 480 x 60 shape.
// Fills every word with random data, reads it all back (checking the
// one-clock read latency), then does simultaneous random writes and reads
// against a reference array, including read-during-write of one address,
// which must return the old word.
module tb_block_ram;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we;
  logic [8:0]  waddr, raddr;
  logic [59:0] wdata, rdata;
  block_ram dut (.*);

  logic [59:0] ref_mem [480];
  int checks = 0, failures = 0;

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 480; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = 60'({$urandom, $urandom});
      ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 480; a++) begin
      raddr = 9'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL read %0d", a); end
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      logic [59:0] expv;
      @(negedge clk);
      we = 1'($urandom);
      waddr = 9'($urandom % 480);
      raddr = (i % 5 == 0) ? waddr : 9'($urandom % 480);
      wdata = 60'({$urandom, $urandom});
      expv = ref_mem[raddr];
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== expv) begin failures++; $display("FAIL mixed %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
