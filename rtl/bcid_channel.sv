// Bunch-crossing identification of one hit channel.
//
// The (delayed) hit signal clocks a capture flip-flop whose D input is the
// channel's mask bit, so a masked channel never captures.  The captured hit
// is sampled by two chains of two flip-flops.  The first chain runs on the
// BCID clock (the 40 MHz clock after the BCID delay), the second on the gate
// clock (the BCID clock after a further 0-25 ns delay).  A chain reports a
// hit on the first of its clock edges that sees the capture flip-flop set.
// The two reports are combined and registered on the BCID clock into OUT,
// a one-clock pulse.  The second chain widens the window of hit times that
// belong to one bunch crossing beyond 25 ns: a hit that falls just after a
// BCID clock edge is reported in that crossing through the gate chain and in
// the next one through the BCID chain.  The second flip-flop of the BCID
// chain clears the capture flip-flop, which then stays cleared until that
// flip-flop has seen the capture go low, about two clocks.
//
// The flip-flops, their clocks and the clear path follow the chip's BCID
// schematic; combining each chain's "first sample" and then the two chains
// with an OR is this design's reading of it.  RESET_ clears every flip-flop.
module bcid_channel (
  input  logic hit,      // delayed hit, rising edge = hit
  input  logic mask,     // 1 = channel enabled
  input  logic bclk,     // BCID clock
  input  logic gclk,     // gate clock
  input  logic rst_n,    // RESET_, asynchronous, active low
  output logic out       // identified hit, one BCID-clock cycle
);
  logic cap, u1, u2, l1, l2, clr;

  assign clr = u2 | ~rst_n;

  always_ff @(posedge hit or posedge clr)
    if (clr) cap <= 1'b0;
    else     cap <= mask;

  always_ff @(posedge bclk or negedge rst_n)
    if (!rst_n) {u2, u1} <= '0;
    else        {u2, u1} <= {u1, cap};

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) {l2, l1} <= '0;
    else        {l2, l1} <= {l1, cap};

  always_ff @(posedge bclk or negedge rst_n)
    if (!rst_n) out <= 1'b0;
    else        out <= (u1 & ~u2) | (l1 & ~l2);
endmodule
