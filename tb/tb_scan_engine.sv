// tb_scan_engine: self-checking test of the sequential ladder processor.
// A program memory is loaded with a ladder program: the four-rung example
// ladder (with its parallel branches written as LNK-merged rungs), a seal-in
// latch on an internal relay, coil read-back in the same scan, and six rungs of
// random elements. The engine runs with fresh random inputs every scan; after
// each scan the output port is compared with a reference interpreter that
// walks the same program word by word. Also checks the scan period
// (2 cycles x 7 elements x 16 rungs = 224 cycles), that outputs stay 0 in
// program mode, and that switching back to run restarts cleanly.
module tb_scan_engine;
  import plc_pkg::*;

  localparam int M = ELEMS_PER_RUNG, N = RUNGS, DEPTH = M * N;
  localparam int SCAN_CYCLES = 2 * M * N;

  logic clk = 0, rst_n = 0, run = 0;
  logic [NUM_IN-1:0] inputs = '0;
  logic [PM_AW-1:0] pm_raddr, pm_waddr = '0;
  logic [INSTR_W-1:0] pm_rdata, pm_wdata = '0;
  logic pm_we = 0;
  logic [NUM_OUT-1:0] outputs;
  logic scan_done;
  logic [15:0] scan_count;

  instr_t prog [DEPTH];
  logic [DM_BITS-1:0] img;
  int checks = 0, failures = 0;

  prog_mem u_pm (.clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata), .raddr(pm_raddr), .rdata(pm_rdata));
  scan_engine dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t el(op_e op, int a);
    el.op = op;
    el.addr = DM_AW'(a);
  endfunction

  // Reference interpreter: one scan over prog with the given inputs.
  function automatic logic [NUM_OUT-1:0] ref_scan(logic [NUM_IN-1:0] in);
    logic p, s;
    img[IN_BASE +: NUM_IN] = in;
    s = 0;
    for (int r = 0; r < N; r++) begin
      p = 1;
      for (int e = 0; e < M; e++) begin
        instr_t w;
        w = prog[r * M + e];
        case (w.op)
          OP_XIC: p = p && img[w.addr];
          OP_XIO: p = p && !img[w.addr];
          OP_LNK: s = s || p;
          OP_OTE: begin img[w.addr] = s || p; s = 0; end
          default: ;
        endcase
      end
    end
    return img[OUT_BASE +: NUM_OUT];
  endfunction

  task automatic build_program();
    int i;
    for (int k = 0; k < DEPTH; k++) prog[k] = el(OP_NOP, 0);
    // rungs 0-1: Lamp (Q16) = I0 & ~I1 & (I2 | I3) & ~I4
    i = 0 * M; prog[i] = el(OP_XIC, 0); prog[i+1] = el(OP_XIO, 1); prog[i+2] = el(OP_XIC, 2); prog[i+3] = el(OP_XIO, 4); prog[i+4] = el(OP_LNK, 0);
    i = 1 * M; prog[i] = el(OP_XIC, 0); prog[i+1] = el(OP_XIO, 1); prog[i+2] = el(OP_XIC, 3); prog[i+3] = el(OP_XIO, 4); prog[i+4] = el(OP_OTE, 16);
    // rungs 2-3: Fan (Q17)
    i = 2 * M; prog[i] = el(OP_XIC, 5); prog[i+1] = el(OP_XIO, 6); prog[i+2] = el(OP_XIC, 7); prog[i+3] = el(OP_XIO, 9); prog[i+4] = el(OP_LNK, 0);
    i = 3 * M; prog[i] = el(OP_XIC, 5); prog[i+1] = el(OP_XIO, 6); prog[i+2] = el(OP_XIC, 8); prog[i+3] = el(OP_XIO, 9); prog[i+4] = el(OP_OTE, 17);
    // rung 4: LED (Q18), rung 5: Motor (Q19)
    i = 4 * M; prog[i] = el(OP_XIC, 10); prog[i+1] = el(OP_XIO, 11); prog[i+2] = el(OP_OTE, 18);
    i = 5 * M; prog[i+3] = el(OP_XIC, 12); prog[i+5] = el(OP_XIO, 13); prog[i+6] = el(OP_OTE, 19);
    // rungs 6-7: seal-in relay M32 = (I14 | M32) & ~I15 ; Q20 = M32
    i = 6 * M; prog[i] = el(OP_XIC, 14); prog[i+1] = el(OP_XIO, 15); prog[i+2] = el(OP_LNK, 0);
    i = 7 * M; prog[i] = el(OP_XIC, 32); prog[i+1] = el(OP_XIO, 15); prog[i+2] = el(OP_OTE, 32); prog[i+3] = el(OP_OTE, 20);
    // rung 8: Q21 = ~Q16 (coil read back in the same scan), two coils on one rung
    i = 8 * M; prog[i] = el(OP_XIO, 16); prog[i+1] = el(OP_OTE, 21); prog[i+2] = el(OP_XIC, 17); prog[i+3] = el(OP_OTE, 22);
    // rung 9: Q23 = 1 (empty rung drives a coil)
    i = 9 * M; prog[i+6] = el(OP_OTE, 23);
    // rungs 10-15: random elements, coils only to output/relay bits
    for (int k = 10 * M; k < DEPTH; k++) begin
      int op;
      op = $urandom_range(4);
      if (op == 3) prog[k] = el(OP_OTE, $urandom_range(63, 24));
      else         prog[k] = el(op_e'(op), $urandom_range(63));
    end
  endtask

  int ncheck_scan = 0;
  initial begin
    logic [NUM_OUT-1:0] want;
    logic [NUM_IN-1:0] next_in;
    int t_prev, t_now, cyc;
    build_program();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // program mode: load words
    for (int k = 0; k < DEPTH; k++) begin
      pm_we = 1; pm_waddr = PM_AW'(k); pm_wdata = prog[k];
      @(negedge clk);
      checks++;
      if (outputs !== '0 || scan_done) begin failures++; $display("activity in program mode"); end
    end
    pm_we = 0;
    img = '0;
    // run mode
    next_in = NUM_IN'($urandom);
    inputs = next_in;
    run = 1;
    cyc = 0; t_prev = -1;
    for (int s = 0; s < 300; s++) begin
      // wait for scan_done
      do begin @(negedge clk); cyc++; end while (!scan_done);
      t_now = cyc;
      want = ref_scan(inputs);
      if (t_prev >= 0) begin
        checks++;
        if (t_now - t_prev != SCAN_CYCLES) begin failures++; $display("scan period %0d", t_now - t_prev); end
      end else begin
        checks++;
        if (t_now != SCAN_CYCLES) begin failures++; $display("first scan took %0d", t_now); end
      end
      t_prev = t_now;
      // new inputs for the next scan, loaded at the coming edge
      next_in = NUM_IN'($urandom);
      if (s % 3 == 0) next_in[15:14] = 2'b01;  // exercise the seal-in
      inputs = next_in;
      @(negedge clk); cyc++;
      checks++;
      if (outputs !== want) begin failures++; $display("scan %0d: outputs %h want %h", s, outputs, want); end
    end
    // back to program mode: outputs go to 0 and the engine stops
    run = 0;
    @(negedge clk);
    repeat (SCAN_CYCLES + 5) begin
      @(negedge clk);
      checks++;
      if (outputs !== '0 || scan_done) failures++;
    end
    // run again: first scan period again 224 cycles, outputs 0 until it ends
    inputs = 16'h0001;
    run = 1;
    cyc = 0;
    do begin
      @(negedge clk); cyc++;
      if (!scan_done) begin checks++; if (outputs !== '0) failures++; end
    end while (!scan_done);
    checks++;
    if (cyc != SCAN_CYCLES) begin failures++; $display("restart scan took %0d", cyc); end
    want = ref_scan(inputs);
    @(negedge clk);
    checks++;
    if (outputs !== want) begin failures++; $display("restart: outputs %h want %h", outputs, want); end
    $display("scans=%0d scan_count=%0d", 301, scan_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
