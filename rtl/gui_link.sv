// gui_link: command decoder for the PC monitoring and control program.
//
// The PC sends single-byte commands over the serial link and the PLC answers
// with single-byte status reports:
//   0xA0 | s  set the four software switches SWS4..SWS1 to s[3:0]
//   0x50      request a status report
//   status    {3'b100, HWSEL, FB4..FB1}
// A status report is also sent, unprompted, whenever the feedback bits or the
// source select change, so the GUI's device indicators follow the outputs.
// Reports are queued as one pending flag: several triggers while the
// transmitter is busy give a single report carrying the latest state. Other
// bytes are ignored. The byte protocol is this design's own; the document only
// shows a GUI that switches four devices on and off and monitors them.
module gui_link (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic [7:0] tx_data,
  output logic       tx_start,
  input  logic       tx_busy,
  input  logic [3:0] fb,
  input  logic       hwsel,
  output logic [3:0] sws
);

  localparam logic [3:0] CMD_SET   = 4'hA;
  localparam logic [7:0] CMD_QUERY = 8'h50;

  logic       pending;
  logic [4:0] seen;  // {hwsel, fb} last reported

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sws      <= '0;
      pending  <= 1'b0;
      seen     <= '0;
      tx_data  <= '0;
      tx_start <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      if (rx_valid && rx_data[7:4] == CMD_SET) sws <= rx_data[3:0];
      if ((rx_valid && rx_data == CMD_QUERY) || {hwsel, fb} != seen) pending <= 1'b1;
      if (pending && !tx_busy && !tx_start) begin
        tx_data  <= {3'b100, hwsel, fb};
        tx_start <= 1'b1;
        seen     <= {hwsel, fb};
        pending  <= 1'b0;
      end
    end
  end

  // A report is only started when the transmitter is free.
  a_start_when_free: assert property (@(posedge clk) disable iff (!rst_n) tx_start |-> !tx_busy);

endmodule
