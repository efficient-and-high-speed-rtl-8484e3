// Self-checking testbench for fm0_logic.
//
// Drives a bit clock of 20 ns (high in the first half of each cycle), puts a
// data bit on x 2 ns after each rising edge and samples fm0_code in the
// middle of both halves. The expected symbol comes from the FM0 rules, not
// from the circuit: the level inverts at every bit boundary, and inverts
// again mid-bit for a 0 but holds for a 1. The symbol of a bit is expected
// one cycle after the bit was presented. First the five-bit example 0,1,1,0,1
// is checked against its known waveform (low-high, low-low, high-high,
// low-high, low-low, starting from reset), then 400 random bits.
module tb_fm0_logic;

  logic clk = 1'b0;
  logic rst_n;
  logic x;
  logic fm0_code;

  int checks = 0;
  int failures = 0;

  fm0_logic dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .x(x), .fm0_code(fm0_code));

  always #10 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic last_level;   // second-half level of the last symbol sent

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  // Present bit b in this cycle and check the symbol of prev in the same
  // cycle; exp_a/exp_b come from the rules applied by the caller.
  task automatic cycle(input logic b, input logic exp_a, input logic exp_b);
    @(posedge clk);
    #2 x = b;
    #3 check(fm0_code, exp_a, "first half");
    #10 check(fm0_code, exp_b, "second half");
  endtask

  logic [4:0] ex_bits  = 5'b10110;              // bit i = cycle i+1: 0,1,1,0,1
  logic [9:0] ex_wave  = 10'b01_00_11_01_00;    // A,B of cycles 1..5

  initial begin
    logic prev, a, b, nb;
    rst_n = 1'b0;
    x = 1'b0;
    #25 rst_n = 1'b1;   // released in the low phase of the first cycle

    // The reset state is sent before the first bit: low then high.
    // Example of the coding rules: cycle k presents bit k and sends bit k-1.
    prev = ex_bits[0];
    @(posedge clk);
    #2 x = prev;
    // no symbol of data yet in this cycle: the reset symbol
    #3 check(fm0_code, 1'b0, "reset symbol A");
    #10 check(fm0_code, 1'b1, "reset symbol B");
    for (int i = 1; i <= 5; i++) begin
      nb = (i < 5) ? ex_bits[i] : 1'b0;
      cycle(nb, ex_wave[9 - 2*(i-1)], ex_wave[8 - 2*(i-1)]);
    end

    // Continue with random bits, expected symbol from the rules.
    last_level = ex_wave[0];
    prev = nb;
    for (int i = 0; i < 400; i++) begin
      nb = 1'($urandom_range(0, 1));
      a = ~last_level;
      b = prev ? a : ~a;
      cycle(nb, a, b);
      last_level = b;
      prev = nb;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_fm0_logic
