// End-to-end testbench for dsrc_baseband_top.
//
// The transmit line is looped back into the receive path, as a link through
// the two RF front-ends would: the receiver samples the line in the middle
// of each half of every 20 ns bit cycle (a 10 ns sampling clock offset by a
// quarter bit) and the bit clock itself marks the first half. Random data
// is sent in runs of FM0 and Manchester of random length, with the same
// code selected on both sides. The testbench checks every decoded bit:
//   Manchester cycle: the bit presented in the same cycle;
//   FM0 cycle: the bit presented in the previous FM0 cycle (the FM0 stream
//     pauses during Manchester cycles and resumes where it stopped; the
//     first FM0 cycle after reset sends the reset symbol, which decodes as 0).
// It corrupts the second half of some symbols on the line and checks that
// the receiver flags them: at once in Manchester, at the next symbol's start
// in FM0. Everywhere else the violation flag must stay low.
// It counts each mechanism of the design (FM0 zeros and ones, Manchester
// bits, switches in both directions, cycles with the FM0 clock gated off,
// both kinds of detected coding violation) and fails if one never happened.
// Every parameter is at its default.
module tb_dsrc_baseband_top;
  import dsrc_codec_pkg::*;

  logic       tx_clk = 1'b0;
  logic       rx_clk = 1'b0;
  logic       rst_n;
  code_mode_e mode;
  logic       tx_data;
  logic       tx_line;
  logic       corrupt;
  logic       rx_bit_valid, rx_bit, rx_violation;

  int checks = 0;
  int failures = 0;
  int gclk_pulses = 0;

  dsrc_baseband_top dut (
    .tx_clk        (tx_clk),
    .tx_rst_n      (rst_n),
    .tx_mode       (mode),
    .tx_data       (tx_data),
    .tx_line       (tx_line),
    .rx_clk        (rx_clk),
    .rx_rst_n      (rst_n),
    .rx_mode       (mode),
    .rx_first_half (tx_clk),
    .rx_line       (tx_line ^ corrupt),
    .rx_bit_valid  (rx_bit_valid),
    .rx_bit        (rx_bit),
    .rx_violation  (rx_violation)
  );

  always #10 tx_clk = ~tx_clk;   // rising edges at 10, 30, 50, ...
  always #5  rx_clk = ~rx_clk;   // rising edges at 5, 15, 25, ...

  always @(posedge dut.u_encoder.u_fm0_logic.gclk) gclk_pulses++;

  localparam int NCYCLES = 20000;

  initial begin
    repeat (NCYCLES + 1000) @(posedge tx_clk);
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
    logic pending_fm0;       // bit whose FM0 symbol is sent in the next FM0 cycle
    int   run_left;
    bit   inject, expect_fm0_flag;
    int   pulses_before;
    int   fm0_zero = 0, fm0_one = 0, man_bits = 0;
    int   to_man = 0, to_fm0 = 0, gated_cycles = 0;
    int   man_flagged = 0, fm0_flagged = 0;

    rst_n = 1'b0;
    mode = MODE_FM0;
    tx_data = 1'b0;
    corrupt = 1'b0;
    #3 rst_n = 1'b1;
    pending_fm0 = 1'b0;      // reset symbol decodes as 0
    run_left = 40;
    expect_fm0_flag = 1'b0;

    @(posedge tx_clk);
    #2;
    for (int c = 0; c < NCYCLES; c++) begin
      // 2 ns after the rising edge that starts cycle c
      if (run_left == 0) begin
        if (mode == MODE_FM0) begin
          mode = MODE_MANCHESTER; to_man++;
        end else begin
          mode = MODE_FM0; to_fm0++;
        end
        run_left = $urandom_range(1, 40);
        expect_fm0_flag = 1'b0;
      end
      run_left--;
      tx_data = 1'($urandom_range(0, 1));
      pulses_before = gclk_pulses;
      // corrupt only where the next cycle uses the same code
      inject = (run_left > 0) && ($urandom_range(0, 99) < 3);

      #10 corrupt = inject;              // second half
      #5;                                // second-half sample at +15
      #2 corrupt = 1'b0;                 // +19: decoder result is registered

      check(rx_bit_valid, 1'b1, "decoder result present");
      if (mode == MODE_MANCHESTER) begin
        if (inject) begin
          check(rx_violation, 1'b1, "Manchester violation flagged");
          if (rx_violation) man_flagged++;
        end else begin
          check(rx_violation, 1'b0, "no violation on a clean Manchester bit");
          check(rx_bit, tx_data, "Manchester bit");
          man_bits++;
        end
        gated_cycles++;
      end else begin
        check(rx_violation, expect_fm0_flag, "FM0 violation flag");
        if (expect_fm0_flag && rx_violation) fm0_flagged++;
        if (!inject) check(rx_bit, pending_fm0, "FM0 bit");
        if (pending_fm0) fm0_one++; else fm0_zero++;
        pending_fm0 = tx_data;
        expect_fm0_flag = inject;
      end

      #3;                                // +2 of the next cycle
      check(gclk_pulses != pulses_before, mode == MODE_FM0,
            "FM0 flip-flops clocked only after FM0 cycles");
    end

    checks++;
    if (fm0_zero == 0 || fm0_one == 0 || man_bits == 0 || to_man == 0 ||
        to_fm0 == 0 || gated_cycles == 0 || man_flagged == 0 || fm0_flagged == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: fm0_zero=%0d fm0_one=%0d manchester=%0d to_manchester=%0d to_fm0=%0d gated_cycles=%0d manchester_violations=%0d fm0_violations=%0d",
             fm0_zero, fm0_one, man_bits, to_man, to_fm0, gated_cycles, man_flagged, fm0_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_dsrc_baseband_top
