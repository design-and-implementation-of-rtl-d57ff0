// data_mem: bit-addressed PLC data image ("data memory") in distributed RAM.
//
// Holds the input image, the output image (coils) and the internal relays as
// BITS single-bit cells. The scan engine reads one bit combinationally (as a
// distributed RAM reads) and writes one bit per clock. Once per scan the input
// image (bits IN_BASE..IN_BASE+NUM_IN-1) is loaded in parallel from the
// physical inputs, and the output image (bits OUT_BASE..) is always visible on
// out_image so that the engine can copy it to the output port. A bit write and
// an input load in the same cycle both take effect; the load wins on the input
// bits. Reset clears every bit. Distributed memory for data follows the
// document; the parallel load/read ports and the reset are this design's own.
module data_mem #(
  parameter int BITS     = plc_pkg::DM_BITS,
  parameter int NUM_IN   = plc_pkg::NUM_IN,
  parameter int NUM_OUT  = plc_pkg::NUM_OUT,
  parameter int IN_BASE  = plc_pkg::IN_BASE,
  parameter int OUT_BASE = plc_pkg::OUT_BASE,
  parameter int AW       = $clog2(BITS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [AW-1:0]      raddr,
  output logic               rbit,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic               wbit,
  input  logic               in_load,
  input  logic [NUM_IN-1:0]  in_image,
  output logic [NUM_OUT-1:0] out_image
);

  logic [BITS-1:0] cells;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cells <= '0;
    end else begin
      if (we) cells[waddr] <= wbit;
      if (in_load) cells[IN_BASE +: NUM_IN] <= in_image;
    end
  end

  assign rbit      = cells[raddr];
  assign out_image = cells[OUT_BASE +: NUM_OUT];

endmodule
