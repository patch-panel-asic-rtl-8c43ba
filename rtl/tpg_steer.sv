// Output control of the test pulse generator.
//
// The output stage has fifteen equal current sources that are switched
// between the two open-drain pins of the differential pair.  The 4-bit
// amplitude turns on that many sources (thermometer code: SRC_EN[i] is on
// for AMP > i), so AMP = 0 gives no signal and AMP = 15 the largest one.
// The current is steered to one pin or the other by the delayed pulse and
// the polarity: with POL low (anode board) TPULSE carries the positive-logic
// pulse and TPULSE_ its complement; POL high swaps them.  With no source on
// both pin indications are low.  Combinational.  The number of sources, the
// amplitude code and the polarity rule follow the chip; the thermometer
// order and the steering between pins are this design's reading of the
// output schematic.
module tpg_steer (
  input  logic        pulse,     // delayed test pulse
  input  logic [3:0]  amp,       // TPG_AMP
  input  logic        pol,       // POL
  output logic [14:0] src_en,    // current sources switched on
  output logic        tpulse,    // current steered to TPULSE
  output logic        tpulse_n   // current steered to TPULSE_
);
  always_comb
    for (int i = 0; i < 15; i++) src_en[i] = (amp > 4'(i));

  logic active, side;
  assign active   = (amp != 4'd0);
  assign side     = pulse ^ pol;
  assign tpulse   = active &  side;
  assign tpulse_n = active & ~side;
endmodule
