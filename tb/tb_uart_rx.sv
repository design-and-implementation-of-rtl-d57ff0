// tb_uart_rx: self-checking test of the serial receiver.
// Sends random 8-N-1 frames at 16 clocks per bit (baud rate scaled for a short
// run; the frame logic is the same), with random idle gaps, and checks each
// received byte and that valid comes within one bit time after the stop bit's
// middle. A frame with a low stop bit must produce no byte, and a short glitch
// on the idle line must not start a frame.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0, got = 0;
  logic [7:0] last;

  uart_rx #(.CLK_HZ(CPB * 9600), .BAUD(9600)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (valid) begin got++; last = data; end

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = stop; repeat (CPB) @(negedge clk);
    rxd = 1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      logic [7:0] b;
      int g;
      b = 8'($urandom);
      g = got;
      send(b, 1'b1);
      repeat (4) @(negedge clk);  // synchroniser + half bit already passed
      checks += 2;
      if (got != g + 1) begin failures++; $display("byte %0d: %0d strobes", n, got - g); end
      if (last !== b) begin failures++; $display("byte %0d: got %h want %h", n, last, b); end
      repeat ($urandom_range(3 * CPB)) @(negedge clk);
    end
    // framing error
    begin
      int g;
      g = got;
      send(8'h5A, 1'b0);
      repeat (3 * CPB) @(negedge clk);
      checks++;
      if (got != g) begin failures++; $display("framing error accepted"); end
    end
    // glitch shorter than half a bit
    begin
      int g;
      g = got;
      rxd = 0; repeat (3) @(negedge clk); rxd = 1;
      repeat (12 * CPB) @(negedge clk);
      checks++;
      if (got != g) begin failures++; $display("glitch produced a byte"); end
      send(8'hC3, 1'b1);
      repeat (4) @(negedge clk);
      checks++;
      if (got != g + 1 || last !== 8'hC3) begin failures++; $display("byte after glitch lost"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
