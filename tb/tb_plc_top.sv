// tb_plc_top: end-to-end test of the whole PLC at its default parameters
// (100 MHz clock, 9600-baud serial link, 16-rung x 7-element program).
//
// 1. Program mode: the host loads, over the ISA bus, a ladder program that
//    implements the same four-rung example as the parallel circuit
//    (Lamp, Fan, LED, Motor on outputs 0-3) plus a seal-in relay on output 4.
// 2. Run mode: for random switch settings, the scan engine's outputs must
//    match a reference model of the ladder and the parallel circuit's coils,
//    scans must repeat every 224 cycles (2.24 us at 100 MHz), and with SEL = 1
//    the devices must follow the ladder.
// 3. GUI: command bytes sent on the serial line set the software switches;
//    with SEL = 0 the devices follow them; status reports decoded from the
//    serial output must carry the feedback; a query gets a report.
// 4. The host reads back outputs, feedback and the scan counter, then returns
//    to program mode, which must stop the scans and clear the outputs.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_plc_top;
  import plc_pkg::*;

  localparam logic [9:0] BASE = 10'h300;
  localparam realtime BIT_NS = 1.0e9 / 9600.0;

  logic clk = 0, rst_n = 0;
  logic [13:0] sw = '0;
  logic sel = 1;
  logic [9:0] isa_sa = '0;
  logic isa_aen = 1, isa_iow_n = 1, isa_ior_n = 1;
  logic [7:0] isa_sd_in = '0, isa_sd_out;
  logic isa_sd_oe;
  logic rxd = 1, txd;
  logic [3:0] comp, fb, ladder_coils;
  logic hwsel, swsel, plc_run, scan_done;
  logic [NUM_OUT-1:0] plc_q;

  int checks = 0, failures = 0;
  int n_prog_words = 0, n_scan_period = 0, n_seq_match = 0, n_par_match = 0,
      n_hw_path = 0, n_sw_path = 0, n_gui_set = 0, n_report = 0, n_query = 0,
      n_readback = 0, n_prog_stop = 0, n_latch = 0;

  plc_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference ladder ----------------
  function automatic logic [3:0] ref_coils(logic [13:0] s);
    logic [14:1] x;
    x = s;
    ref_coils[0] = x[1] && !x[2] && (x[3] || x[4]) && !x[5];
    ref_coils[1] = x[6] && !x[7] && (x[8] || x[9]) && !x[10];
    ref_coils[2] = x[11] && !x[12];
    ref_coils[3] = x[13] && !x[14];
  endfunction

  // ---------------- ISA bus model ----------------
  task automatic iow(input logic [9:0] a, input logic [7:0] d);
    isa_sa = a; isa_aen = 0;
    @(negedge clk);
    isa_sd_in = d; isa_iow_n = 0;
    repeat (12) @(negedge clk);
    isa_iow_n = 1;
    @(negedge clk);
    isa_aen = 1;
    repeat (3) @(negedge clk);
  endtask

  task automatic ior(input logic [9:0] a, output logic [7:0] d);
    isa_sa = a; isa_aen = 0;
    @(negedge clk);
    isa_ior_n = 0;
    repeat (3) @(negedge clk);
    d = isa_sd_oe ? isa_sd_out : 8'hXX;
    isa_ior_n = 1; isa_aen = 1;
    @(negedge clk);
  endtask

  function automatic instr_t el(op_e op, int a);
    el.op = op;
    el.addr = DM_AW'(a);
  endfunction

  // ---------------- serial models ----------------
  task automatic uart_send(input logic [7:0] b);
    rxd = 0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT_NS); end
    rxd = 1; #(BIT_NS);
  endtask

  logic [7:0] reports [$];
  initial begin : uart_monitor
    forever begin
      logic [7:0] b;
      @(negedge txd);
      #(BIT_NS / 2);
      if (txd == 0) begin
        for (int i = 0; i < 8; i++) begin #(BIT_NS); b[i] = txd; end
        #(BIT_NS);
        if (txd == 1) reports.push_back(b);
        else begin failures++; $display("serial report without stop bit"); end
      end
    end
  end

  // ---------------- scan period monitor ----------------
  longint last_done = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (scan_done) begin
      if (last_done >= 0) begin
        checks++;
        if (cyc - last_done != 2 * RUNGS * ELEMS_PER_RUNG) begin
          failures++; $display("scan period %0d", cyc - last_done);
        end else n_scan_period++;
      end
      last_done <= cyc;
    end
  end

  initial begin
    instr_t prog [PM_DEPTH];
    logic [7:0] rd;
    int i;
    for (int k = 0; k < PM_DEPTH; k++) prog[k] = el(OP_NOP, 0);
    i = 0 * ELEMS_PER_RUNG; prog[i] = el(OP_XIC, 0); prog[i+1] = el(OP_XIO, 1); prog[i+2] = el(OP_XIC, 2); prog[i+3] = el(OP_XIO, 4); prog[i+4] = el(OP_LNK, 0);
    i = 1 * ELEMS_PER_RUNG; prog[i] = el(OP_XIC, 0); prog[i+1] = el(OP_XIO, 1); prog[i+2] = el(OP_XIC, 3); prog[i+3] = el(OP_XIO, 4); prog[i+4] = el(OP_OTE, OUT_BASE + 0);
    i = 2 * ELEMS_PER_RUNG; prog[i] = el(OP_XIC, 5); prog[i+1] = el(OP_XIO, 6); prog[i+2] = el(OP_XIC, 7); prog[i+3] = el(OP_XIO, 9); prog[i+4] = el(OP_LNK, 0);
    i = 3 * ELEMS_PER_RUNG; prog[i] = el(OP_XIC, 5); prog[i+1] = el(OP_XIO, 6); prog[i+2] = el(OP_XIC, 8); prog[i+3] = el(OP_XIO, 9); prog[i+4] = el(OP_OTE, OUT_BASE + 1);
    i = 4 * ELEMS_PER_RUNG; prog[i] = el(OP_XIC, 10); prog[i+1] = el(OP_XIO, 11); prog[i+2] = el(OP_OTE, OUT_BASE + 2);
    i = 5 * ELEMS_PER_RUNG; prog[i] = el(OP_XIC, 12); prog[i+1] = el(OP_XIO, 13); prog[i+2] = el(OP_OTE, OUT_BASE + 3);
    // seal-in: M32 = (SW3 | M32) & ~SW2 ; Q4 = M32
    i = 6 * ELEMS_PER_RUNG; prog[i] = el(OP_XIC, 2); prog[i+1] = el(OP_XIO, 1); prog[i+2] = el(OP_LNK, 0);
    i = 7 * ELEMS_PER_RUNG; prog[i] = el(OP_XIC, MRK_BASE); prog[i+1] = el(OP_XIO, 1); prog[i+2] = el(OP_OTE, MRK_BASE); prog[i+3] = el(OP_OTE, OUT_BASE + 4);

    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // ---- 1. program mode: load over ISA ----
    iow(BASE + 0, 8'h00);
    iow(BASE + 1, 8'h00);
    for (int k = 0; k < PM_DEPTH; k++) begin
      iow(BASE + 2, prog[k][7:0]);
      iow(BASE + 3, {7'b0, prog[k][8]});
      n_prog_words++;
    end
    ior(BASE + 1, rd);
    checks++;
    if (rd !== 8'(PM_DEPTH)) begin failures++; $display("program address after load %h", rd); end
    checks++;
    if (scan_done || plc_q !== '0) begin failures++; $display("engine active in program mode"); end

    // ---- 2. run mode ----
    iow(BASE + 0, 8'h01);
    sel = 1;
    for (int n = 0; n < 60; n++) begin
      logic [13:0] s;
      s = 14'($urandom);
      if (n % 4 == 0) s[1] = 1'b0;
      sw = s;
      #1;
      // parallel path: immediate
      checks += 2;
      if (ladder_coils !== ref_coils(s)) begin failures++; $display("parallel coils %b want %b", ladder_coils, ref_coils(s)); end
      else n_par_match++;
      if (comp !== ref_coils(s)) begin failures++; $display("comp %b want %b (SEL=1)", comp, ref_coils(s)); end
      else n_hw_path++;
      // sequential path: after at most two scans
      repeat (2 * 2 * RUNGS * ELEMS_PER_RUNG + 2) @(negedge clk);
      checks++;
      if (plc_q[3:0] !== ref_coils(s)) begin failures++; $display("scan outputs %b want %b", plc_q[3:0], ref_coils(s)); end
      else n_seq_match++;
    end
    // seal-in: press SW3 (start) with SW2 (stop) released, release SW3, then stop
    sw = 14'b0; sw[2] = 1;
    repeat (500) @(negedge clk);
    sw[2] = 0;
    repeat (500) @(negedge clk);
    checks++;
    if (plc_q[4] !== 1'b1) begin failures++; $display("seal-in did not hold"); end
    sw[1] = 1;
    repeat (500) @(negedge clk);
    checks++;
    if (plc_q[4] !== 1'b0) begin failures++; $display("seal-in did not release"); end
    else n_latch++;
    sw[1] = 0;

    // ---- 3. GUI over the serial link ----
    sel = 0;
    #(12 * BIT_NS);
    reports.delete();
    for (int n = 0; n < 4; n++) begin
      logic [3:0] s;
      s = (n == 0) ? 4'hF : 4'($urandom);
      if (n == 3) s = ~comp;  // guarantee a change
      uart_send({4'hA, s});
      #(2 * BIT_NS);
      checks++;
      if (comp !== s || fb !== s) begin failures++; $display("GUI set %h: comp %h fb %h", s, comp, fb); end
      else n_gui_set++;
      n_sw_path++;
      #(12 * BIT_NS);
    end
    // every report must be a valid status byte; the last one the current state
    checks++;
    if (reports.size() == 0) begin failures++; $display("no status reports"); end
    else begin
      foreach (reports[k]) begin
        checks++;
        if (reports[k][7:5] !== 3'b100) failures++;
      end
      checks++;
      if (reports[$] !== {3'b100, hwsel, fb}) begin failures++; $display("last report %h, state %h", reports[$], {3'b100, hwsel, fb}); end
      n_report += reports.size();
    end
    reports.delete();
    uart_send(8'h50);
    #(14 * BIT_NS);
    checks++;
    if (reports.size() != 1 || reports[0] !== {3'b100, hwsel, fb}) begin
      failures++; $display("query: %0d reports", reports.size());
    end else n_query++;

    // ---- 4. host readback ----
    sw = 14'b00_0100_0000_0001 | 14'b0000_0000_0000_0100;  // SW1, SW3, SW11: Lamp and LED
    repeat (1000) @(negedge clk);
    ior(BASE + 4, rd);
    checks++;
    if (rd !== plc_q[7:0] || rd[3:0] !== 4'b0101) begin failures++; $display("q readback %h", rd); end
    else n_readback++;
    ior(BASE + 6, rd);
    checks++;
    if (rd !== {3'b0, hwsel, fb}) begin failures++; $display("fb readback %h", rd); end
    else n_readback++;
    begin
      logic [7:0] c0, c1;
      ior(BASE + 7, c0);
      repeat (10 * 224) @(negedge clk);
      ior(BASE + 7, c1);
      checks++;
      if (8'(c1 - c0) < 8'd9 || 8'(c1 - c0) > 8'd11) begin failures++; $display("scan counter moved %0d", 8'(c1 - c0)); end
      else n_readback++;
    end
    // back to program mode
    iow(BASE + 0, 8'h00);
    repeat (3 * 224) @(negedge clk);
    checks++;
    if (plc_q !== '0) begin failures++; $display("outputs not cleared in program mode"); end
    else n_prog_stop++;

    // ---- mechanism coverage ----
    $display("program words %0d, scan periods %0d, sequential matches %0d, parallel matches %0d",
             n_prog_words, n_scan_period, n_seq_match, n_par_match);
    $display("hw path %0d, sw path %0d, gui sets %0d, reports %0d, queries %0d, readbacks %0d, seal-in %0d, program stop %0d",
             n_hw_path, n_sw_path, n_gui_set, n_report, n_query, n_readback, n_latch, n_prog_stop);
    if (n_prog_words == 0) failures++;
    if (n_scan_period == 0) failures++;
    if (n_seq_match == 0) failures++;
    if (n_par_match == 0) failures++;
    if (n_hw_path == 0) failures++;
    if (n_sw_path == 0) failures++;
    if (n_gui_set == 0) failures++;
    if (n_report == 0) failures++;
    if (n_query == 0) failures++;
    if (n_readback == 0) failures++;
    if (n_latch == 0) failures++;
    if (n_prog_stop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
