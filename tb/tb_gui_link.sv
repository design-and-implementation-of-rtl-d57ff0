// tb_gui_link: self-checking test of the GUI command decoder.
// A simple transmitter model holds tx_busy for 20 cycles after each tx_start
// and records every byte sent. Checks: set commands update SWS, other bytes do
// not; a query gives exactly one status report; a feedback change gives a
// report with the new state; changes while busy collapse into one report
// carrying the latest state; the report format is {3'b100, HWSEL, FB}.
module tb_gui_link;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = '0, tx_data;
  logic rx_valid = 0, tx_start, tx_busy;
  logic [3:0] fb = '0, sws;
  logic hwsel = 0;
  int checks = 0, failures = 0;
  int busy_left = 0;
  logic [7:0] sent [$];

  gui_link dut (.*);
  always #5 clk = ~clk;

  assign tx_busy = busy_left != 0;
  always @(posedge clk) begin
    if (tx_start) begin
      if (tx_busy) begin failures++; $display("start while busy"); end
      sent.push_back(tx_data);
      busy_left <= 20;
    end else if (busy_left != 0) busy_left <= busy_left - 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rx(input logic [7:0] b);
    rx_data = b; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask

  task automatic settle();
    repeat (60) @(negedge clk);
  endtask

  task automatic expect_sent(input int n, input logic [7:0] last_b, input string what);
    checks++;
    if (sent.size() != n) begin failures++; $display("%s: %0d reports, want %0d", what, sent.size(), n); end
    else if (n > 0) begin
      checks++;
      if (sent[n - 1] !== last_b) begin failures++; $display("%s: report %h want %h", what, sent[n - 1], last_b); end
    end
    sent.delete();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    settle();
    expect_sent(0, 8'h00, "after reset");
    // set commands
    for (int n = 0; n < 50; n++) begin
      logic [3:0] s;
      s = 4'($urandom);
      rx({4'hA, s});
      @(negedge clk);
      checks++;
      if (sws !== s) begin failures++; $display("sws %h want %h", sws, s); end
    end
    // other bytes ignored
    begin
      logic [3:0] keep;
      keep = sws;
      rx(8'h3F); rx(8'hB5); rx(8'h51);
      @(negedge clk);
      checks++;
      if (sws !== keep) begin failures++; $display("sws changed by a foreign byte"); end
    end
    settle();
    expect_sent(0, 8'h00, "foreign bytes");
    // query
    fb = 4'h0; hwsel = 0;
    rx(8'h50);
    settle();
    expect_sent(1, 8'h80, "query");
    // feedback change
    fb = 4'h5;
    settle();
    expect_sent(1, 8'h85, "fb change");
    hwsel = 1;
    settle();
    expect_sent(1, 8'h95, "hwsel change");
    // burst of changes while busy: first report immediately, then one with the latest state
    fb = 4'h1; @(negedge clk); @(negedge clk);
    fb = 4'h2; @(negedge clk);
    fb = 4'hC; @(negedge clk);
    settle();
    checks += 2;
    if (sent.size() != 2) begin failures++; $display("burst: %0d reports", sent.size()); end
    else if (sent[1] !== 8'h9C) begin failures++; $display("burst: last report %h", sent[1]); end
    sent.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
