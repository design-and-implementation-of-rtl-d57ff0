// tb_prog_mem: self-checking test of the program memory.
// Fills the memory with random words through the write port, then reads every
// address back and checks the data one clock after the address (block-RAM
// latency). Also checks that a write to one address leaves the others alone.
module tb_prog_mem;
  localparam int DEPTH = 112, WIDTH = 9, AW = 7;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  prog_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int a);
    raddr <= AW'(a);
    @(posedge clk);  // address registered on this edge
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("addr %0d: got %h want %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = WIDTH'($urandom);
      we <= 1; waddr <= AW'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 0;
    for (int a = 0; a < DEPTH; a++) read_check(a);
    // single overwrite; neighbours unchanged
    model[50] = ~model[50];
    we <= 1; waddr <= 7'd50; wdata <= model[50];
    @(posedge clk);
    we <= 0;
    for (int a = 48; a < 53; a++) read_check(a);
    for (int n = 0; n < 200; n++) read_check($urandom_range(DEPTH - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
