// plc_top: FPGA-based programmable logic controller.
//
// Two ways of running ladder logic sit side by side, fed by the same 14 field
// switches SW1..SW14:
//  * Parallel execution: the example four-rung ladder (Lamp, Fan, LED, Motor)
//    translated into gates (ladder_fig2). Its coils are the hardware-switch
//    signals HWS1..HWS4 of the source selector (hw_sw_select), which drives the
//    four devices COMP1..COMP4 either from them (SEL = 1) or from the software
//    switches SWS1..SWS4 set by the PC GUI (SEL = 0).
//  * Sequential execution: a programmable scan engine (scan_engine with its
//    data_mem) runs a ladder program from block RAM (prog_mem), two clock
//    cycles per element, 224 cycles for the largest 16-rung x 7-element
//    program. Its 16 outputs are the port plc_q.
// A host computer loads programs and switches between program and run mode
// over an ISA-style I/O bus (isa_decoder), and can read back the outputs,
// feedback and scan counter. The GUI talks over a 9600 8-N-1 serial link
// (uart_rx, uart_tx, gui_link): it sets SWS1..4 and receives status reports
// carrying FB1..FB4 and HWSEL. Scan-engine inputs 0..13 are SW1..SW14, inputs
// 14 and 15 are 0. Which signals feed which block, beyond the document's
// selector circuit, is this design's reading of the document's framework.
module plc_top
  import plc_pkg::*;
#(
  parameter int CLK_HZ = 100_000_000,
  parameter int BAUD   = 9600
) (
  input  logic               clk,
  input  logic               rst_n,
  // field switches and source select
  input  logic [13:0]        sw,
  input  logic               sel,
  // ISA host bus (data bus split into in/out/enable)
  input  logic [9:0]         isa_sa,
  input  logic               isa_aen,
  input  logic               isa_iow_n,
  input  logic               isa_ior_n,
  input  logic [7:0]         isa_sd_in,
  output logic [7:0]         isa_sd_out,
  output logic               isa_sd_oe,
  // serial link to the GUI
  input  logic               rxd,
  output logic               txd,
  // devices and indicators
  output logic [3:0]         comp,
  output logic [3:0]         fb,
  output logic               hwsel,
  output logic               swsel,
  output logic [3:0]         ladder_coils,  // {Motor, LED, Fan, Lamp}
  // scan engine
  output logic [NUM_OUT-1:0] plc_q,
  output logic               plc_run,
  output logic               scan_done
);

  // ---------------- host interface and program memory ----------------
  logic               pm_we;
  logic [PM_AW-1:0]   pm_waddr, pm_raddr;
  logic [INSTR_W-1:0] pm_wdata, pm_rdata;
  logic [15:0]        scan_count;

  isa_decoder u_isa (
    .clk         (clk),
    .rst_n       (rst_n),
    .sa          (isa_sa),
    .aen         (isa_aen),
    .iow_n       (isa_iow_n),
    .ior_n       (isa_ior_n),
    .sd_in       (isa_sd_in),
    .sd_out      (isa_sd_out),
    .sd_oe       (isa_sd_oe),
    .run         (plc_run),
    .pm_we       (pm_we),
    .pm_waddr    (pm_waddr),
    .pm_wdata    (pm_wdata),
    .status_q    (plc_q),
    .status_fb   (fb),
    .status_hwsel(hwsel),
    .status_scan (scan_count[7:0])
  );

  prog_mem u_pm (
    .clk  (clk),
    .we   (pm_we),
    .waddr(pm_waddr),
    .wdata(pm_wdata),
    .raddr(pm_raddr),
    .rdata(pm_rdata)
  );

  // ---------------- sequential execution ----------------
  scan_engine u_scan (
    .clk       (clk),
    .rst_n     (rst_n),
    .run       (plc_run),
    .inputs    ({2'b00, sw}),
    .pm_raddr  (pm_raddr),
    .pm_rdata  (pm_rdata),
    .outputs   (plc_q),
    .scan_done (scan_done),
    .scan_count(scan_count)
  );

  // ---------------- parallel execution and source select ----------------
  logic [3:0] sws;

  ladder_fig2 u_ladder (
    .sw   (sw),
    .lamp (ladder_coils[0]),
    .fan  (ladder_coils[1]),
    .led  (ladder_coils[2]),
    .motor(ladder_coils[3])
  );

  hw_sw_select #(.CHANNELS(4)) u_sel (
    .hws  (ladder_coils),
    .sws  (sws),
    .sel  (sel),
    .comp (comp),
    .fb   (fb),
    .hwsel(hwsel),
    .swsel(swsel)
  );

  // ---------------- GUI serial link ----------------
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_start, tx_busy;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk  (clk),
    .rst_n(rst_n),
    .rxd  (rxd),
    .data (rx_data),
    .valid(rx_valid)
  );

  gui_link u_gui (
    .clk     (clk),
    .rst_n   (rst_n),
    .rx_data (rx_data),
    .rx_valid(rx_valid),
    .tx_data (tx_data),
    .tx_start(tx_start),
    .tx_busy (tx_busy),
    .fb      (fb),
    .hwsel   (hwsel),
    .sws     (sws)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk  (clk),
    .rst_n(rst_n),
    .data (tx_data),
    .start(tx_start),
    .busy (tx_busy),
    .txd  (txd)
  );

endmodule
