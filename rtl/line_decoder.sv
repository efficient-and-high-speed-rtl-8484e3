// FM0/Manchester line decoder for the receive path.
//
// The receiver samples the line once in each half of every bit cycle; the
// first-half sample (a) is stored and the bit is decided at the second-half
// sample (b):
//   Manchester: bit = b, since the code is CLK XOR X with CLK high in the
//               first half; a == b breaks the mid-bit transition and is
//               flagged as a coding violation.
//   FM0:        bit = (a == b), since a 1 holds its level through the bit
//               and a 0 changes it; a == previous b breaks the transition
//               every FM0 symbol must have at its start and is flagged.
// The boundary check starts with the second FM0 symbol after reset or after
// Manchester mode, because there is no earlier FM0 symbol to compare with.
//
// Interface: clk is the half-bit sampling clock (two rising edges per bit,
// one inside each half); first_half is high at the edge that samples the
// first half; line_in is the received code; mode selects the code. bit_valid
// pulses for one clk cycle with bit_out and violation, registered at the
// edge that samples the second half.
// The design names the receive-side decoder and what it must do (decode the
// data bits and check them); it does not say how, nor define the sync pulse
// or parity it mentions, so the sampling scheme, the violation check and
// all of the interface are this implementation's choices.
module line_decoder
  import dsrc_codec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  code_mode_e mode,
  input  logic       first_half,
  input  logic       line_in,
  output logic       bit_valid,
  output logic       bit_out,
  output logic       violation
);

  logic half_a;      // first-half sample of the current bit
  logic prev_b;      // second-half level of the previous FM0 symbol
  logic have_prev;   // prev_b holds a real FM0 symbol

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_a    <= 1'b0;
      prev_b    <= 1'b0;
      have_prev <= 1'b0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      violation <= 1'b0;
    end else if (first_half) begin
      half_a    <= line_in;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= 1'b1;
      prev_b    <= line_in;
      if (mode == MODE_MANCHESTER) begin
        bit_out   <= line_in;
        violation <= (half_a == line_in);
        have_prev <= 1'b0;
      end else begin
        bit_out   <= (half_a == line_in);
        violation <= have_prev && (half_a == prev_b);
        have_prev <= 1'b1;
      end
    end
  end

endmodule : line_decoder
