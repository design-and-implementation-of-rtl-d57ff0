// plc_pkg: types and constants shared by the ladder-logic PLC.
//
// A ladder program is stored as a flat list of element words, ELEMS_PER_RUNG
// slots per rung and RUNGS rungs. Each word holds an opcode and the bit address
// of its operand in the data image. The five elements mirror the parts of a
// relay ladder: an empty slot, a normally open contact, a normally closed
// contact, a coil, and a vertical link that merges a rung's flow into the next
// rung's network. The choice of exactly these five, their encoding and the
// 16 x 7 program shape are this design's own; the program size follows from the
// 224-cycle (2.24 us at 100 MHz) scan of the largest program at two cycles per
// element.
//
// Data image map (bit addresses): 0-15 input image, 16-31 output image
// (coils), 32-63 internal relays.
package plc_pkg;

  parameter int RUNGS          = 16;
  parameter int ELEMS_PER_RUNG = 7;
  parameter int PM_DEPTH       = RUNGS * ELEMS_PER_RUNG;  // 112 element words
  parameter int PM_AW          = $clog2(PM_DEPTH);

  parameter int DM_BITS  = 64;
  parameter int DM_AW    = $clog2(DM_BITS);
  parameter int NUM_IN   = 16;
  parameter int NUM_OUT  = 16;
  parameter int IN_BASE  = 0;
  parameter int OUT_BASE = 16;
  parameter int MRK_BASE = 32;

  // Ladder elements.
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,  // empty slot: flow passes unchanged
    OP_XIC = 3'd1,  // normally open contact: product &= bit
    OP_XIO = 3'd2,  // normally closed contact: product &= ~bit
    OP_OTE = 3'd3,  // coil: bit = sum | product, then sum = 0
    OP_LNK = 3'd4   // vertical link to the next rung: sum |= product
  } op_e;

  typedef struct packed {
    op_e              op;
    logic [DM_AW-1:0] addr;
  } instr_t;

  parameter int INSTR_W = $bits(instr_t);  // 9

endpackage
