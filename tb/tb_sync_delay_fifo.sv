// Self-checking testbench for sync_delay_fifo: drives random 3-bit words and
// checks that each appears on dout exactly one clock later (default depth),
// and that dout is zero right after reset. A second instance of depth 4
// checks the general delay.
module tb_sync_delay_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0] din, dout1, dout4;
  sync_delay_fifo dut1 (.clk, .rst, .din, .dout(dout1));
  sync_delay_fifo #(.WIDTH(3), .DEPTH(4)) dut4 (.clk, .rst, .din, .dout(dout4));

  int checks = 0, failures = 0;
  logic [2:0] hist [$];

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (dout1 !== 3'b0 || dout4 !== 3'b0) failures++;
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      din = 3'($urandom);
      hist.push_front(din);
      @(posedge clk);
      #1;
      checks++;
      if (dout1 !== hist[0]) begin failures++; $display("FAIL depth1 cycle %0d", i); end
      if (i >= 3) begin
        checks++;
        if (dout4 !== hist[3]) begin failures++; $display("FAIL depth4 cycle %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
