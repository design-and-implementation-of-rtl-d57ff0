// ladder_fig2: the four-rung example ladder translated into parallel logic.
//
// This is the "parallel execution" form of a ladder program: every rung is its
// own combinational circuit, so all four coils respond to the switches at
// gate speed with no scan. The rungs are those of the document's example
// (a lamp and a fan on A.C., an LED and a motor on D.C.):
//   Lamp  = SW1  & ~SW2 & (SW3 | SW4) & ~SW5
//   Fan   = SW6  & ~SW7 & (SW8 | SW9) & ~SW10
//   LED   = SW11 & ~SW12
//   Motor = SW13 & ~SW14
// SW2/SW7 are read as normally closed stop push-buttons and SW3/SW8 as normally
// open start push-buttons; SW5, SW10, SW12 and SW14 are normally closed
// contacts. The contact drawn right of each coil is taken as part of the
// rung's series path. sw[0] is SW1. Purely combinational.
module ladder_fig2 (
  input  logic [13:0] sw,
  output logic        lamp,
  output logic        fan,
  output logic        led,
  output logic        motor
);

  assign lamp  = sw[0]  & ~sw[1] & (sw[2] | sw[3]) & ~sw[4];
  assign fan   = sw[5]  & ~sw[6] & (sw[7] | sw[8]) & ~sw[9];
  assign led   = sw[10] & ~sw[11];
  assign motor = sw[12] & ~sw[13];

endmodule
