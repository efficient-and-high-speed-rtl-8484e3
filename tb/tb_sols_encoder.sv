// Self-checking testbench for sols_encoder.
//
// Runs the encoder through long FM0 and Manchester stretches with random
// data and random mode switches (mode and data change 2 ns after a rising
// edge of the 20 ns bit clock; the line is sampled in the middle of each
// half-cycle). The expected line comes from a cycle model of the encoder:
//   Manchester cycle: high-then-low for a 0, low-then-high for a 1, no
//     latency;
//   FM0 cycle: the held FM0 state (A, B), which advances at the end of
//     every FM0 cycle as B' = B xor X, A' = not B, and holds through
//     Manchester cycles because the clock gate stops it.
// Independently of that model, every FM0 cycle that follows two FM0 cycles
// must obey the FM0 rules for the bit presented one cycle earlier: a level
// change at the start, a mid-bit change for a 0 and none for a 1. The gated
// clock inside the encoder is watched to confirm it does not pulse during
// Manchester cycles and does pulse during FM0 cycles.
module tb_sols_encoder;
  import dsrc_codec_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  code_mode_e mode;
  logic       x;
  logic       line;

  int checks = 0;
  int failures = 0;
  int gclk_pulses = 0;

  sols_encoder dut (.clk(clk), .rst_n(rst_n), .mode(mode), .x(x), .line(line));

  always #10 clk = ~clk;
  always @(posedge dut.u_fm0_logic.gclk) gclk_pulses++;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    logic       ma, mb;            // model of DFF_A, DFF_B
    logic       a, b, last_b;
    logic       prev_x;
    code_mode_e prev_mode, prev2_mode;
    int         run_left;
    int         fm0_cycles = 0, man_cycles = 0, switches = 0;
    int         pulses_before;

    rst_n = 1'b0;
    mode  = MODE_FM0;
    x     = 1'b0;
    #15 rst_n = 1'b1;
    ma = 1'b0; mb = 1'b1;
    prev_x = 1'b0;
    prev_mode = MODE_FM0; prev2_mode = MODE_MANCHESTER;
    last_b = 1'b1;
    run_left = 20;

    @(posedge clk);
    #2;
    // each pass starts 2 ns after a rising edge of clk and ends 2 ns after
    // the next one
    for (int c = 0; c < 1500; c++) begin
      if (run_left == 0) begin
        mode = (mode == MODE_FM0) ? MODE_MANCHESTER : MODE_FM0;
        run_left = $urandom_range(1, 30);
        switches++;
      end
      run_left--;
      x = 1'($urandom_range(0, 1));
      pulses_before = gclk_pulses;
      #3 a = line;
      #10 b = line;

      if (mode == MODE_MANCHESTER) begin
        man_cycles++;
        check(a, ~x, "Manchester first half");
        check(b, x, "Manchester second half");
      end else begin
        fm0_cycles++;
        check(a, ma, "FM0 first half (model)");
        check(b, mb, "FM0 second half (model)");
        if (prev_mode == MODE_FM0 && prev2_mode == MODE_FM0) begin
          check(a, ~last_b, "FM0 rule 3: change at bit start");
          check(a == b, prev_x, "FM0 rules 1/2: mid-bit change for 0 only");
        end
        // the state advances at the rising edge that ends this cycle
        ma = ~mb;
        mb = mb ^ x;
      end
      last_b = b;
      prev_x = x;
      prev2_mode = prev_mode;
      prev_mode = mode;

      // no gated-clock pulse inside the cycle; one at its closing edge only
      // if the cycle was an FM0 cycle
      check(gclk_pulses != pulses_before, 1'b0, "gated clock quiet inside cycle");
      #7 check(gclk_pulses != pulses_before, mode == MODE_FM0,
               "gated clock pulses only after FM0 cycles");
    end

    checks++;
    if (fm0_cycles == 0 || man_cycles == 0 || switches < 4) begin
      failures++;
      $display("FAIL coverage fm0=%0d manchester=%0d switches=%0d", fm0_cycles, man_cycles, switches);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_sols_encoder
