// FM0 encoder datapath (the "FM0 logic" of the SOLS encoder).
//
// FM0 sends every data bit X as two half-bit levels: A in the first half of
// the bit cycle (CLK high) and B in the second half (CLK low). The level
// inverts at every bit boundary (A(t) = ~B(t-1)); it inverts again in the
// middle of the bit for a 0 and holds for a 1, so B(t) = A(t) XNOR X(t),
// which reduces to B(t) = B(t-1) XOR X(t).
//
// Structure, as in the design's block diagram: XOR_1 combines X with the
// stored B and feeds DFF_B; DFF_A takes the inverse of DFF_B's output; MUX_1,
// selected by CLK, passes DFF_A (input 1, CLK high) and DFF_B (input 0, CLK
// low) to the output.
//
// Clock gating: the two flip-flops are clocked through a clock gate
// (clock_gate) enabled by en, so while en is low they hold their state and do
// not toggle. MUX_1 keeps the ungated CLK as its select, as in the diagram,
// so the output is right from the first cycle after en returns.
//
// Interface: clk is the bit clock (high in the first half of a cycle);
// en enables the flip-flops' clock from the next rising edge of clk (the
// encoder drives it high in FM0 mode); x must be valid before the rising edge that ends its bit cycle; fm0_code
// is the FM0 waveform. rst_n is an asynchronous active-low reset.
// Timing: both flip-flops load on the rising edge of clk (when enabled), so the symbol of
// the bit presented in cycle t is sent during cycle t+1 (one cycle latency).
// Reset leaves DFF_B = 1 and DFF_A = 0, so the first symbol starts low: after
// reset a 0 is sent as low-then-high, the initial polarity of the design's
// coding example. Rising-edge clocking, the reset and its values are this
// implementation's choices.
module fm0_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic fm0_code
);

  logic q_a;     // DFF_A: first-half level A of the symbol being sent
  logic q_b;     // DFF_B: second-half level B of the symbol being sent
  logic xor_1;
  logic gclk;    // clock of DFF_A and DFF_B

  clock_gate u_clock_gate (
    .clk  (clk),
    .en   (en),
    .gclk (gclk)
  );

  assign xor_1 = x ^ q_b;

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      q_b <= 1'b1;
      q_a <= 1'b0;
    end else begin
      q_b <= xor_1;
      q_a <= ~q_b;
    end
  end

  // MUX_1: input 1 (DFF_A) while CLK is high, input 0 (DFF_B) while low.
  assign fm0_code = clk ? q_a : q_b;

endmodule : fm0_logic
