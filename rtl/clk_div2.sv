// Divide-by-two of the 40 MHz system clock.
//
// Produces the 20 MHz reference clock of the PLL: the ring oscillator is
// locked so that one pass around the ring takes half a period of this
// clock (25 ns).  A single toggle flip-flop, cleared by the active-low
// system reset, so the reference starts low after RESET_.
module clk_div2 (
  input  logic clk,    // 40 MHz system clock
  input  logic rst_n,  // RESET_, asynchronous, active low
  output logic q       // 20 MHz reference, toggles on each rising clk edge
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= ~q;
endmodule
