// Self-checking testbench for clock_gate.
//
// Changes en at random moments of both clock phases and checks that
//  - while clk is high, gclk equals clk AND the en seen at the last rising
//    edge of clk (the gate decision is frozen for the whole high phase);
//  - gclk is low whenever clk is low;
//  - every edge of gclk coincides with an edge of clk (no glitch or clipped
//    pulse).
// Also checks that some pulses were passed and some were blocked.
module tb_clock_gate;

  logic clk = 1'b0;
  logic en;
  logic gclk;

  int checks = 0;
  int failures = 0;
  int passed = 0;
  int blocked = 0;

  logic en_at_rise;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #10 clk = ~clk;

  always @(posedge clk) begin
    en_at_rise = en;
    if (en) passed++; else blocked++;
  end

  always @(gclk) begin
    checks++;
    // clk toggles every 10 ns from time 0
    if ($time % 10 != 0) begin
      failures++;
      $display("FAIL gclk edge at %0t not on a clk edge", $time);
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      // one change of en inside every phase of clk, away from its edges
      @(clk);
      #($urandom_range(1, 8));
      en = 1'($urandom_range(0, 1));
      #0.5;
      checks++;
      if (gclk !== (clk & en_at_rise)) begin
        failures++;
        $display("FAIL gclk=%0b clk=%0b en_at_rise=%0b at %0t", gclk, clk, en_at_rise, $time);
      end
    end
    checks++;
    if (passed == 0 || blocked == 0) begin
      failures++;
      $display("FAIL passed=%0d blocked=%0d", passed, blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_clock_gate
