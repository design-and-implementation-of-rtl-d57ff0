// prog_mem: ladder program store ("user memory") held in block RAM.
//
// A simple dual-port RAM: the host writes element words through the write
// port while the PLC is in program mode, and the scan engine reads them through
// a synchronous read port. Read data appears on the clock edge after the
// address is presented, as in an FPGA block RAM; this one-cycle read is what
// gives every ladder element a fetch cycle and an execute cycle. The contents
// are not touched by reset. Using block memory for the program follows the
// document; the depth (112 words) follows from its 224-cycle largest scan, the
// 9-bit width from this design's instruction encoding.
module prog_mem #(
  parameter int DEPTH = plc_pkg::PM_DEPTH,
  parameter int WIDTH = plc_pkg::INSTR_W,
  parameter int AW    = $clog2(DEPTH)
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
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
