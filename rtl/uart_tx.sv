// uart_tx: serial transmitter for the PC link.
//
// Sends one start bit, 8 data bits LSB first and one stop bit, each CPB clocks
// long (9600 8-N-1 by default). A start pulse while idle latches data; busy is
// high from the next cycle until the stop bit has been sent. The line idles
// high. Frame format follows the GUI's serial settings; the handshake is this
// design's own.
module uart_tx #(
  parameter int CLK_HZ = 100_000_000,
  parameter int BAUD   = 9600,
  parameter int CPB    = CLK_HZ / BAUD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       busy,
  output logic       txd
);

  logic [9:0]               frame;  // stop, data[7:0], start; sent LSB first
  logic [3:0]               bitn;
  logic [$clog2(CPB+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      txd   <= 1'b1;
      frame <= '1;
      bitn  <= '0;
      cnt   <= '0;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        busy  <= 1'b1;
        bitn  <= '0;
        cnt   <= '0;
      end
    end else begin
      txd <= frame[bitn];
      if (int'(cnt) == CPB - 1) begin
        cnt <= '0;
        if (bitn == 4'd9) busy <= 1'b0;
        else              bitn <= bitn + 1'b1;
      end else cnt <= cnt + 1'b1;
    end
  end

  // The line is high whenever the transmitter is idle.
  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n) !busy && !$past(busy) |-> txd);

endmodule
