// Self-checking testbench for line_decoder.
//
// The testbench encodes random bits itself, from the coding rules, into
// pairs of half-bit levels and feeds them to the decoder on a 10 ns sampling
// clock (two samples per bit; inputs change on the falling edge). It checks
// every decoded bit and violation flag one sampling edge after the second
// half was taken. Both codes are used, with mode switches, and coding errors
// are injected on purpose: a Manchester bit without its mid-bit change, and
// an FM0 symbol without its change at the bit start. Each injected error must
// be flagged, and no clean symbol may be.
module tb_line_decoder;
  import dsrc_codec_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  code_mode_e mode;
  logic       first_half;
  logic       line_in;
  logic       bit_valid;
  logic       bit_out;
  logic       violation;

  int checks = 0;
  int failures = 0;

  line_decoder dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .first_half(first_half),
    .line_in(line_in), .bit_valid(bit_valid), .bit_out(bit_out),
    .violation(violation)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // Send one symbol (a, b) and check the decoder's answer.
  task automatic symbol(input logic a, input logic b, input logic exp_bit,
                        input logic exp_viol, input logic check_bit);
    @(negedge clk);
    first_half = 1'b1;
    line_in = a;
    @(negedge clk);
    check(bit_valid, 1'b0, "no result after a first half");
    first_half = 1'b0;
    line_in = b;
    @(negedge clk);
    check(bit_valid, 1'b1, "result after a second half");
    if (check_bit) check(bit_out, exp_bit, "decoded bit");
    check(violation, exp_viol, "violation flag");
  endtask

  initial begin
    logic level;        // last level on the line
    logic d, a, b;
    int   fm0_bits = 0, man_bits = 0, fm0_err = 0, man_err = 0;
    bit   fm0_started;

    rst_n = 1'b0;
    mode = MODE_FM0;
    first_half = 1'b1;
    line_in = 1'b0;
    #12 rst_n = 1'b1;
    level = 1'b1;
    fm0_started = 1'b0;

    for (int blk = 0; blk < 40; blk++) begin
      mode = (blk % 2 == 0) ? MODE_FM0 : MODE_MANCHESTER;
      fm0_started = 1'b0;
      for (int i = 0; i < 50; i++) begin
        d = 1'($urandom_range(0, 1));
        if (mode == MODE_MANCHESTER) begin
          a = ~d; b = d;
          if (i == 25) begin
            // drop the mid-bit change
            b = a;
            man_err++;
            symbol(a, b, b, 1'b1, 1'b0);
          end else begin
            man_bits++;
            symbol(a, b, d, 1'b0, 1'b1);
          end
          level = b;
        end else begin
          a = ~level;
          if (i == 25 && fm0_started) begin
            // drop the change at the bit start
            a = level;
            fm0_err++;
          end
          b = d ? a : ~a;
          symbol(a, b, d, (i == 25 && fm0_started), 1'b1);
          fm0_bits++;
          fm0_started = 1'b1;
          level = b;
        end
      end
    end

    checks++;
    if (fm0_bits == 0 || man_bits == 0 || fm0_err == 0 || man_err == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_line_decoder
