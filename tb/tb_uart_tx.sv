// tb_uart_tx: self-checking test of the serial transmitter.
// Sends random bytes at 16 clocks per bit and decodes the line independently:
// finds the start edge, samples mid-bit, and checks start bit, data (LSB
// first), stop bit, and the frame length of 10 bit times (busy time).
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] data = '0;
  logic busy, txd;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(CPB * 9600), .BAUD(9600)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (txd !== 1'b1) failures++;
    for (int n = 0; n < 200; n++) begin
      logic [7:0] b, r;
      int busy_cycles;
      b = 8'($urandom);
      data = b; start = 1;
      @(negedge clk);
      start = 0;
      data = ~b;  // must have been latched
      // wait for start edge
      while (txd) @(negedge clk);
      repeat (CPB / 2) @(negedge clk);
      checks++;
      if (txd !== 1'b0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        r[i] = txd;
      end
      repeat (CPB) @(negedge clk);
      checks += 2;
      if (txd !== 1'b1) begin failures++; $display("bad stop bit"); end
      if (r !== b) begin failures++; $display("byte %0d: got %h want %h", n, r, b); end
      busy_cycles = 0;
      while (busy) begin @(negedge clk); busy_cycles++; end
      checks++;
      // from mid stop bit to end of frame: half a bit, give or take a cycle
      if (busy_cycles < CPB / 2 - 2 || busy_cycles > CPB / 2 + 2) begin
        failures++; $display("frame length off: %0d", busy_cycles);
      end
      repeat ($urandom_range(5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
