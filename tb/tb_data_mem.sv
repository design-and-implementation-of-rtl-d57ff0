// tb_data_mem: self-checking test of the bit-addressed data image.
// Random bit writes, input-image loads and reads are compared against a
// 64-bit reference vector; checks that reset clears every bit, that a load
// overrides a same-cycle write on an input bit, and the output-image port.
module tb_data_mem;
  logic clk = 0, rst_n = 0;
  logic [5:0] raddr = '0, waddr = '0;
  logic rbit, we = 0, wbit = 0, in_load = 0;
  logic [15:0] in_image = '0, out_image;
  logic [63:0] model;
  int checks = 0, failures = 0;

  data_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 64; a++) begin
      raddr = 6'(a);
      #1;
      checks++;
      if (rbit !== model[a]) begin failures++; $display("bit %0d got %b want %b", a, rbit, model[a]); end
    end
    checks++;
    if (out_image !== model[31:16]) begin failures++; $display("out_image %h want %h", out_image, model[31:16]); end
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    model = '0;
    check_all();
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 6'($urandom);
      wbit = 1'($urandom);
      in_load = ($urandom_range(7) == 0);
      in_image = 16'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wbit;
      if (in_load) model[15:0] = in_image;
      #1;
      we = 0; in_load = 0;
      raddr = 6'($urandom);
      #1;
      checks++;
      if (rbit !== model[raddr]) begin failures++; $display("n=%0d bit %0d got %b want %b", n, raddr, rbit, model[raddr]); end
    end
    check_all();
    // load beats a same-cycle write on an input bit
    @(negedge clk);
    we = 1; waddr = 6'd3; wbit = ~model[3] ; in_load = 1; in_image = 16'h0000;
    @(posedge clk); #1;
    we = 0; in_load = 0;
    model[15:0] = 16'h0000;
    check_all();
    // reset clears
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    model = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
