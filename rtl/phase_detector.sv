// Phase detector of the PLL.
//
// Compares the ring-oscillator output with the 20 MHz reference.  UP goes
// high on a rising reference edge, DOWN on a rising oscillator edge, and
// both are cleared as soon as both are high.  UP therefore lasts as long as
// the oscillator lags the reference (the charge pump then raises VCON to
// speed the ring up) and DOWN as long as it leads (VCON is lowered).
// Because each output is set by an edge, the detector also pulls a ring
// that runs at the wrong frequency towards the reference.  ENV low holds
// both outputs low (detector disabled).  The UP/DOWN interface and the sign
// of the correction follow the chip; the edge-triggered phase-frequency
// structure is this design's choice.
module phase_detector (
  input  logic ref_clk,   // 20 MHz reference
  input  logic vco,       // ring oscillator output
  input  logic env,       // ENV: 1 = detector enabled
  input  logic rst_n,     // RESET_, asynchronous, active low
  output logic up,
  output logic down
);
  logic clr;
  assign clr = (up & down) | ~env | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr)
    if (clr) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(posedge vco or posedge clr)
    if (clr) down <= 1'b0;
    else     down <= 1'b1;
endmodule
