// tb_ladder_fig2: exhaustive test of the parallel four-rung example ladder.
// All 16384 switch combinations are applied. The expected coils come from a
// rung-walking evaluation (left rail, series contacts, parallel branch) written
// independently of the gate equations in the design.
module tb_ladder_fig2;
  logic [13:0] sw;
  logic lamp, fan, led, motor;
  int checks = 0, failures = 0;

  ladder_fig2 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flow through a rung "NO a, NC b, (NO c || NO d), coil, NC e"
  function automatic logic rung_branch(int a, int b, int c, int d, int e, logic [14:1] s);
    logic flow, branch;
    flow = 1'b1;
    if (!s[a]) flow = 1'b0;      // normally open
    if (s[b])  flow = 1'b0;      // normally closed push-button
    branch = s[c] || s[d];
    if (!branch) flow = 1'b0;
    if (s[e])  flow = 1'b0;      // normally closed, right of the coil
    return flow;
  endfunction

  function automatic logic rung_simple(int a, int e, logic [14:1] s);
    return (s[a] == 1'b1) && (s[e] == 1'b0);
  endfunction

  initial begin
    logic [14:1] s;
    for (int v = 0; v < (1 << 14); v++) begin
      sw = 14'(v);
      s  = 14'(v);
      #1;
      checks += 4;
      if (lamp  !== rung_branch(1, 2, 3, 4, 5, s))   failures++;
      if (fan   !== rung_branch(6, 7, 8, 9, 10, s))  failures++;
      if (led   !== rung_simple(11, 12, s))          failures++;
      if (motor !== rung_simple(13, 14, s))          failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
