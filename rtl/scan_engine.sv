// scan_engine: sequential ladder-logic processor of the PLC.
//
// In run mode the engine scans the program held in prog_mem over and over.
// Every element takes two clock cycles: in the fetch cycle the element's
// address goes to the block-RAM program memory; in the execute cycle the
// returned word is decoded, its operand bit is read from the distributed-RAM
// data image (data_mem, instantiated here) and the rung is updated. A rung of
// ELEMS_PER_RUNG elements therefore takes 2*m cycles and a scan of RUNGS rungs
// 2*m*n cycles, 224 cycles (2.24 us at 100 MHz) at the default 16 x 7, which is
// the scan time the document reports for its largest program.
//
// Rung evaluation follows relay ladder logic: the flow ("product") starts at 1
// at the left rail of every rung and is ANDed with each contact (XIC normally
// open, XIO normally closed). LNK is a vertical path: it ORs the rung's flow
// into the network sum. OTE is a coil: it writes sum | product into the data
// image and starts a new network (sum = 0). Coils are state variables and can
// be read back as contacts later in the same scan.
//
// I/O: in the first fetch cycle of a scan the physical inputs are copied into
// the input image, and the output port takes the output image left by the scan
// that has just ended (so outputs change one cycle after scan_done). The
// output port is 0 until the first scan after entering run mode has finished.
// In program mode (run = 0) the engine stays at element 0 with outputs at 0 so
// that the host can load a new program. The element set, the exact I/O
// timing and program-mode behaviour are this design's choices.
module scan_engine
  import plc_pkg::*;
#(
  parameter int RUNGS_P = plc_pkg::RUNGS,
  parameter int ELEMS_P = plc_pkg::ELEMS_PER_RUNG,
  parameter int DEPTH   = RUNGS_P * ELEMS_P,
  parameter int AW      = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic [NUM_IN-1:0]  inputs,
  output logic [AW-1:0]      pm_raddr,
  input  logic [INSTR_W-1:0] pm_rdata,
  output logic [NUM_OUT-1:0] outputs,
  output logic               scan_done,
  output logic [15:0]        scan_count
);

  typedef enum logic {PH_FETCH, PH_EXEC} phase_e;

  phase_e                        phase;
  logic [AW-1:0]                 pc;
  logic [$clog2(ELEMS_P+1)-1:0]  slot;
  logic                          prod, sum;
  logic                          scanned;

  instr_t              instr;
  logic                prod_in, prod_nx, sum_nx;
  logic                dm_rbit, dm_we, dm_wbit, in_load;
  logic [NUM_OUT-1:0]  out_image;
  logic                last_elem;

  assign instr     = instr_t'(pm_rdata);
  assign pm_raddr  = pc;
  assign last_elem = (int'(pc) == DEPTH - 1);
  assign in_load   = run && phase == PH_FETCH && pc == '0;

  data_mem u_dm (
    .clk      (clk),
    .rst_n    (rst_n),
    .raddr    (instr.addr),
    .rbit     (dm_rbit),
    .we       (dm_we),
    .waddr    (instr.addr),
    .wbit     (dm_wbit),
    .in_load  (in_load),
    .in_image (inputs),
    .out_image(out_image)
  );

  // Execute-cycle datapath.
  always_comb begin
    prod_in = (slot == '0) ? 1'b1 : prod;
    prod_nx = prod_in;
    sum_nx  = sum;
    dm_we   = 1'b0;
    dm_wbit = sum | prod_in;
    unique case (instr.op)
      OP_XIC: prod_nx = prod_in & dm_rbit;
      OP_XIO: prod_nx = prod_in & ~dm_rbit;
      OP_LNK: sum_nx  = sum | prod_in;
      OP_OTE: begin
        dm_we  = (phase == PH_EXEC) && run;
        sum_nx = 1'b0;
      end
      default: ;  // OP_NOP and unused codes
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= PH_FETCH;
      pc         <= '0;
      slot       <= '0;
      prod       <= 1'b1;
      sum        <= 1'b0;
      scanned    <= 1'b0;
      outputs    <= '0;
      scan_done  <= 1'b0;
      scan_count <= '0;
    end else if (!run) begin
      phase     <= PH_FETCH;
      pc        <= '0;
      slot      <= '0;
      prod      <= 1'b1;
      sum       <= 1'b0;
      scanned   <= 1'b0;
      outputs   <= '0;
      scan_done <= 1'b0;
    end else begin
      scan_done <= 1'b0;
      if (phase == PH_FETCH) begin
        if (pc == '0 && scanned) outputs <= out_image;
        phase <= PH_EXEC;
      end else begin
        prod  <= prod_nx;
        sum   <= sum_nx;
        phase <= PH_FETCH;
        if (int'(slot) == ELEMS_P - 1) slot <= '0;
        else                           slot <= slot + 1'b1;
        if (last_elem) begin
          pc         <= '0;
          sum        <= 1'b0;
          scanned    <= 1'b1;
          scan_done  <= 1'b1;
          scan_count <= scan_count + 1'b1;
        end else begin
          pc <= pc + 1'b1;
        end
      end
    end
  end

  // The program counter never leaves the program, and a scan ends only on the
  // last element.
  a_pc_in_range: assert property (@(posedge clk) disable iff (!rst_n) int'(pc) < DEPTH);
  a_done_at_end: assert property (@(posedge clk) disable iff (!rst_n) scan_done |-> pc == '0);

endmodule
