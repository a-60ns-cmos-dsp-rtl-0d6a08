// clk_div2: on-chip divide-by-two of the external clock.
//
// The external clock CKI (33.33 MHz) is divided by two to obtain an internal clock of
// exactly 50% duty cycle whatever the duty cycle of CKI; its period is the 60 ns machine
// cycle. A single toggle flip-flop clocked by the rising edge of cki does it; the same
// signal is driven out as CKO. The divider has no reset: it keeps running while the rest
// of the chip is held in reset, and its starting phase does not matter.
//
// From the design: divide by two for a 50% duty cycle, CKI in and CKO out. This
// implementation's choice: one rising-edge toggle flip-flop in place of the two-phase
// overlapping clock generator.
module clk_div2 (
  input  logic cki,
  output logic clk_out
);

  always_ff @(posedge cki) clk_out <= ~clk_out;

endmodule
