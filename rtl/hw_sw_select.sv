// hw_sw_select: hardware/software source selection for the controlled devices.
//
// Each of CHANNELS channels drives one device. A common select line chooses
// whether the device follows the hardware path HWSn (the ladder logic driven
// by the field switches) or the software path SWSn (the switch set from the PC
// GUI): COMPn = (HWSn & SEL) | (SWSn & ~SEL), built from two AND gates, an OR
// gate and an inverter per channel as in the translated circuit. FBn is a
// buffered copy of COMPn returned to the GUI for monitoring, and HWSEL/SWSEL
// report which source is active. That SEL = 1 selects the hardware path is
// this design's choice. Purely combinational.
module hw_sw_select #(
  parameter int CHANNELS = 4
) (
  input  logic [CHANNELS-1:0] hws,
  input  logic [CHANNELS-1:0] sws,
  input  logic                sel,
  output logic [CHANNELS-1:0] comp,
  output logic [CHANNELS-1:0] fb,
  output logic                hwsel,
  output logic                swsel
);

  logic sel_n;
  assign sel_n = ~sel;

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    assign comp[c] = (hws[c] & sel) | (sws[c] & sel_n);
  end

  assign fb    = comp;
  assign hwsel = sel;
  assign swsel = sel_n;

endmodule
