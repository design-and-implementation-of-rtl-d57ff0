// tb_isa_decoder: self-checking test of the ISA host interface.
// An ISA I/O-cycle model (address and AEN set up, strobe low for 12 clocks,
// data held one clock after the strobe rises) writes the mode register and a
// whole 112-word program, which is captured from the program-write port and
// compared with what was sent. Also checks: program words are refused in run
// mode, cycles with AEN high and addresses outside the window are ignored,
// reads return the register contents and status inputs, and the data bus is
// driven only during a decoded read.
module tb_isa_decoder;
  localparam logic [9:0] BASE = 10'h300;
  logic clk = 0, rst_n = 0;
  logic [9:0] sa = '0;
  logic aen = 1, iow_n = 1, ior_n = 1;
  logic [7:0] sd_in = '0, sd_out;
  logic sd_oe, run, pm_we;
  logic [6:0] pm_waddr;
  logic [8:0] pm_wdata;
  logic [15:0] status_q = 16'hBEEF;
  logic [3:0] status_fb = 4'hA;
  logic status_hwsel = 1;
  logic [7:0] status_scan = 8'h3C;
  logic [8:0] captured [128];
  int nwrites = 0;
  int checks = 0, failures = 0;

  isa_decoder dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (pm_we) begin captured[pm_waddr] = pm_wdata; nwrites++; end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic iow(input logic [9:0] a, input logic [7:0] d, input logic en = 1'b0);
    sa = a; aen = en;
    @(negedge clk);
    sd_in = d; iow_n = 0;
    repeat (12) @(negedge clk);
    iow_n = 1;
    @(negedge clk);
    sd_in = 8'($urandom); sa = 10'($urandom); aen = 1;
    repeat (3) @(negedge clk);
  endtask

  task automatic ior_check(input logic [9:0] a, input logic [7:0] want, input string what);
    sa = a; aen = 0;
    @(negedge clk);
    ior_n = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (!sd_oe) begin failures++; $display("%s: bus not driven", what); end
    if (sd_out !== want) begin failures++; $display("%s: read %h want %h", what, sd_out, want); end
    ior_n = 1; aen = 1;
    @(negedge clk);
    checks++;
    if (sd_oe) begin failures++; $display("%s: bus still driven", what); end
  endtask

  initial begin
    logic [8:0] prog [112];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (run !== 0) failures++;
    // program load
    iow(BASE + 1, 8'd0);
    for (int k = 0; k < 112; k++) begin
      prog[k] = 9'($urandom);
      iow(BASE + 2, prog[k][7:0]);
      iow(BASE + 3, {7'b0, prog[k][8]});
    end
    checks++;
    if (nwrites != 112) begin failures++; $display("%0d program writes", nwrites); end
    for (int k = 0; k < 112; k++) begin
      checks++;
      if (captured[k] !== prog[k]) begin failures++; $display("word %0d: %h want %h", k, captured[k], prog[k]); end
    end
    ior_check(BASE + 1, 8'd112, "address after load");
    // random address then one word
    iow(BASE + 1, 8'd37);
    iow(BASE + 2, 8'h5A);
    iow(BASE + 3, 8'h01);
    checks++;
    if (captured[37] !== 9'h15A) begin failures++; $display("word 37 %h", captured[37]); end
    ior_check(BASE + 2, 8'h5A, "pdata_lo");
    ior_check(BASE + 3, 8'h01, "pdata_hi");
    // run mode
    iow(BASE + 0, 8'h01);
    checks++;
    if (run !== 1) begin failures++; $display("run not set"); end
    ior_check(BASE + 0, 8'h01, "control");
    begin
      int n0;
      n0 = nwrites;
      iow(BASE + 3, 8'h00);
      checks++;
      if (nwrites != n0) begin failures++; $display("program write accepted in run mode"); end
    end
    // AEN high and foreign address ignored
    iow(BASE + 0, 8'h00, 1'b1);
    iow(10'h200, 8'h00);
    iow(BASE + 8, 8'h00);
    checks++;
    if (run !== 1) begin failures++; $display("ignored cycle changed the mode"); end
    // status reads
    ior_check(BASE + 4, 8'hEF, "q low");
    ior_check(BASE + 5, 8'hBE, "q high");
    ior_check(BASE + 6, 8'h1A, "fb");
    ior_check(BASE + 7, 8'h3C, "scan");
    // no drive on a foreign read
    sa = 10'h301 ^ 10'h100; aen = 0; ior_n = 0;
    @(negedge clk);
    checks++;
    if (sd_oe) begin failures++; $display("foreign read drove bus"); end
    ior_n = 1; aen = 1;
    // back to program mode
    iow(BASE + 0, 8'h00);
    checks++;
    if (run !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
