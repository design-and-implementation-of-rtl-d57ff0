// tb_hw_sw_select: exhaustive test of the hardware/software source selector.
// All 512 combinations of HWS1..4, SWS1..4 and SEL; each channel must follow
// HWSn when SEL is 1 and SWSn when SEL is 0, FB must equal COMP, and exactly
// one of HWSEL/SWSEL must be high.
module tb_hw_sw_select;
  logic [3:0] hws, sws, comp, fb;
  logic sel, hwsel, swsel;
  int checks = 0, failures = 0;

  hw_sw_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {sel, sws, hws} = 9'(v);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (comp[c] !== (sel ? hws[c] : sws[c])) begin
          failures++;
          $display("v=%0d ch%0d comp=%b", v, c + 1, comp[c]);
        end
      end
      checks += 2;
      if (fb !== comp) failures++;
      if (hwsel !== sel || swsel !== !sel) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
