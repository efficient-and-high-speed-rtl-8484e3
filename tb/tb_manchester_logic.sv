// Self-checking testbench for manchester_logic.
//
// With the bit clock high in the first half of each cycle, a 0 must be sent
// as high-then-low and a 1 as low-then-high in the same cycle. Checks the
// five-bit example 0,1,1,0,1 and then 200 random bits, sampling the middle of
// each half-cycle.
module tb_manchester_logic;

  logic clk = 1'b0;
  logic x;
  logic manchester_code;

  int checks = 0;
  int failures = 0;

  manchester_logic dut (.clk(clk), .x(x), .manchester_code(manchester_code));

  always #10 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  task automatic send(input logic b);
    @(posedge clk);
    #2 x = b;
    #3 check(manchester_code, ~b, "first half");
    #10 check(manchester_code, b, "second half");
  endtask

  initial begin
    logic [4:0] ex = 5'b10110;
    x = 1'b0;
    for (int i = 0; i < 5; i++) send(ex[i]);
    for (int i = 0; i < 200; i++) send(1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_manchester_logic
