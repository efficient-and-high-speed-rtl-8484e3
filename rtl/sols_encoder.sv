// Fully reused FM0/Manchester encoder built with similarity-oriented logic
// simplification (SOLS), with clock gating of the FM0 flip-flops.
//
// One data input X and one line output serve both codes. The FM0 logic
// (XOR_1, DFF_B, DFF_A and MUX_1, see fm0_logic) and the Manchester logic
// (XOR_2, see manchester_logic) both run from the bit clock CLK, and MUX_2,
// selected by Mode, passes the FM0 code (input 0) or the Manchester code
// (input 1) to the output. A clock gate inside the FM0 logic stops the
// clock of its two flip-flops while the Manchester code is selected, so the
// unused half of the encoder does not toggle; the FM0 state is held and FM0
// resumes from it when Mode returns to FM0.
//
// Interface: clk is the bit clock (one data bit per cycle, high in the first
// half); x is the data bit, changed after a rising edge and held for the
// cycle; mode selects the code; line is the encoded output. rst_n is an
// asynchronous active-low reset of the FM0 state.
// Timing: the Manchester code of a bit leaves in the same cycle, the FM0
// code one cycle later (the FM0 flip-flops register it). Mode should change
// right after a rising edge of clk; the clock gate follows from the next
// rising edge. The FM0 stream therefore pauses during Manchester cycles: the
// FM0 symbol of the last bit presented before a switch to Manchester is
// held and sent in the first FM0 cycle after the switch back, so no FM0 bit
// is lost and the FM0 level sequence continues as if the Manchester cycles
// had not been there. The block diagram, the two multiplexer input numbers
// and the coding rules follow the design; the clock-gate circuit, the reset
// and the edge choice are this implementation's.
module sols_encoder
  import dsrc_codec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  code_mode_e mode,
  input  logic       x,
  output logic       line
);

  logic fm0_code;
  logic manchester_code;

  // The clock of the FM0 flip-flops runs only in FM0 mode.
  fm0_logic u_fm0_logic (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (mode == MODE_FM0),
    .x        (x),
    .fm0_code (fm0_code)
  );

  manchester_logic u_manchester_logic (
    .clk             (clk),
    .x               (x),
    .manchester_code (manchester_code)
  );

  // MUX_2
  always_comb begin
    unique case (mode)
      MODE_FM0:        line = fm0_code;
      MODE_MANCHESTER: line = manchester_code;
      default:         line = fm0_code;
    endcase
  end

endmodule : sols_encoder
