// Manchester encoder datapath (the "Manchester logic" of the SOLS encoder).
//
// The Manchester code is the exclusive OR of the bit clock and the data bit
// (XOR_2 in the design's block diagram). With CLK high in the first half of a
// bit cycle, a 0 is sent as high-then-low and a 1 as low-then-high, so the
// code always has a transition in the middle of the bit.
//
// Interface: clk is the bit clock, x the data bit held for the whole cycle,
// manchester_code the encoded waveform.
// Timing: purely combinational; the code of bit t is sent during cycle t.
module manchester_logic (
  input  logic clk,
  input  logic x,
  output logic manchester_code
);

  assign manchester_code = clk ^ x;

endmodule : manchester_logic
