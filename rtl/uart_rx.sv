// uart_rx: serial receiver for the PC link (RS232 levels converted off chip).
//
// Frame: one start bit (0), 8 data bits LSB first, one stop bit (1), no
// parity, at BAUD bits per second (9600 8-N-1, the GUI's settings). The line is
// synchronised with two flops. A falling edge starts a frame; the start bit is
// re-checked half a bit later and each following bit is sampled in the middle
// of its bit time. When the stop bit is sampled high, data is presented with a
// one-cycle valid pulse; a low stop bit (framing error) drops the byte. Bit
// order and the mid-bit sampling are this design's choices.
module uart_rx #(
  parameter int CLK_HZ = 100_000_000,
  parameter int BAUD   = 9600,
  parameter int CPB    = CLK_HZ / BAUD  // clocks per bit
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e                      state;
  logic [1:0]                  sync;
  logic [$clog2(CPB+1)-1:0]    cnt;
  logic [2:0]                  bitn;
  logic [7:0]                  shreg;
  logic                        rx;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= S_IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (!rx) begin
          state <= S_START;
          cnt   <= '0;
        end
        S_START: begin
          if (int'(cnt) == CPB / 2 - 1) begin
            cnt   <= '0;
            state <= rx ? S_IDLE : S_DATA;
            bitn  <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (int'(cnt) == CPB - 1) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= S_STOP;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (int'(cnt) == CPB - 1) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rx) begin
              data  <= shreg;
              valid <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
