// isa_decoder: ISA host-bus interface of the PLC.
//
// Decodes 8-bit I/O cycles of an ISA host in the window BASE_ADDR..+7 and
// latches written data into the PLC's interface registers:
//   +0  R/W control: bit 0 = run (1) / program (0) mode
//   +1  R/W program address (element index)
//   +2  R/W program word, low 8 bits
//   +3  R/W program word bit 8 (bit 0); a write stores the word at the program
//           address and increments the address
//   +4  R   scan-engine outputs 7..0
//   +5  R   scan-engine outputs 15..8
//   +6  R   {3'b0, HWSEL, FB4..FB1}
//   +7  R   scan counter, low byte
// Writes are only honoured when AEN is low. The bus is asynchronous to the PLC
// clock: IOW#, SA and SD pass through matching two-flop delay lines, and a
// write is committed on the synchronised rising edge of IOW#, using the
// address and data sampled just before it. Program words are written only in
// program mode. Reads are decoded combinationally from the live bus, as on a
// plain ISA card: sd_oe is high while IOR# is low with a matching address and
// AEN low. The bidirectional data bus is split into sd_in/sd_out/sd_oe. The
// document names this "address decoding and data latching" module; the
// register map, base address and synchronisation are this design's own.
module isa_decoder #(
  parameter logic [9:0] BASE_ADDR = 10'h300,
  parameter int         PM_AW     = plc_pkg::PM_AW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [9:0]       sa,
  input  logic             aen,
  input  logic             iow_n,
  input  logic             ior_n,
  input  logic [7:0]       sd_in,
  output logic [7:0]       sd_out,
  output logic             sd_oe,
  output logic             run,
  output logic             pm_we,
  output logic [PM_AW-1:0] pm_waddr,
  output logic [8:0]       pm_wdata,
  input  logic [15:0]      status_q,
  input  logic [3:0]       status_fb,
  input  logic             status_hwsel,
  input  logic [7:0]       status_scan
);

  typedef struct packed {
    logic       iow_n;
    logic       aen;
    logic [9:0] sa;
    logic [7:0] sd;
  } bus_t;

  bus_t b0, b1, b2;
  logic [7:0] pdata_lo;
  logic       hit_w;
  logic [2:0] reg_w;

  assign hit_w = !b2.aen && (b2.sa[9:3] == BASE_ADDR[9:3]);
  assign reg_w = b2.sa[2:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b0       <= '{iow_n: 1'b1, aen: 1'b1, default: '0};
      b1       <= '{iow_n: 1'b1, aen: 1'b1, default: '0};
      b2       <= '{iow_n: 1'b1, aen: 1'b1, default: '0};
      run      <= 1'b0;
      pm_we    <= 1'b0;
      pm_waddr <= '0;
      pm_wdata <= '0;
      pdata_lo <= '0;
    end else begin
      b0    <= '{iow_n: iow_n, aen: aen, sa: sa, sd: sd_in};
      b1    <= b0;
      b2    <= b1;
      pm_we <= 1'b0;
      if (pm_we) pm_waddr <= pm_waddr + 1'b1;
      // b2 still holds the last cycle of the strobe while b1 shows it ended.
      if (!b2.iow_n && b1.iow_n && hit_w) begin
        unique case (reg_w)
          3'd0: run      <= b2.sd[0];
          3'd1: pm_waddr <= b2.sd[PM_AW-1:0];
          3'd2: pdata_lo <= b2.sd;
          3'd3: if (!run) begin
            pm_wdata <= {b2.sd[0], pdata_lo};
            pm_we    <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // Read path.
  always_comb begin
    sd_oe  = !ior_n && !aen && (sa[9:3] == BASE_ADDR[9:3]);
    sd_out = '0;
    unique case (sa[2:0])
      3'd0: sd_out = {7'b0, run};
      3'd1: sd_out = 8'(pm_waddr);
      3'd2: sd_out = pdata_lo;
      3'd3: sd_out = {7'b0, pm_wdata[8]};
      3'd4: sd_out = status_q[7:0];
      3'd5: sd_out = status_q[15:8];
      3'd6: sd_out = {3'b0, status_hwsel, status_fb};
      default: sd_out = status_scan;
    endcase
  end

  // Program words are only written in program mode.
  a_write_in_program_mode: assert property (@(posedge clk) disable iff (!rst_n) pm_we |-> !run);

endmodule
