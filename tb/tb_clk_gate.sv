// Testbench of clk_gate: random enables, changed either while the clock is
// low (they must act on the next rising edge) or while it is high (they
// must not act before the falling edge). Checks, on every half period, that
// gclk equals clk AND the enable present at the last falling edge or
// later while clk was low, and counts gated clock pulses.
module tb_clk_gate;

  logic clk = 0, en = 0, gclk;
  int   checks = 0, failures = 0, pulses = 0, expected_pulses = 0;

  clk_gate dut (.*);

  always @(posedge gclk) pulses++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_low;   // enable value seen at the end of the low phase
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // low phase: change enable, it must pass to the next high phase
      #2 en = ($urandom_range(0, 1) == 1);
      #2;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk high while clk low"); end
      en_low = en;
      #1 clk = 1;
      #1;
      checks++;
      if (gclk !== en_low) begin failures++; $display("cycle %0d: gclk=%0b expected %0b", cyc, gclk, en_low); end
      if (en_low) expected_pulses++;
      // high phase: change enable, gclk must not follow it
      #1 en = ~en;
      #2;
      checks++;
      if (gclk !== en_low) begin failures++; $display("cycle %0d: gclk followed en while clk high", cyc); end
      #1 clk = 0;
    end
    #1;
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("pulses %0d expected %0d", pulses, expected_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
