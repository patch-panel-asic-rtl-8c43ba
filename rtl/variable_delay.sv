// Behavioural model of the 32-step variable delay.
//
// The real circuit is a chain of 32 identical delay units, each two
// inverters whose speed is set by the analog control voltage VCON, with a
// 5-bit selector picking the chain tap.  The same units form the PLL's ring
// oscillator, so with the PLL locked every unit delays by
// 25 ns / (units in the ring).  This model delays its input by
// SEL x (unit delay at VCON) with transport semantics (every edge is kept);
// SEL = 0 is no added delay.  The fixed delay of the input and output
// buffers is not modelled.  VCON is carried as an integer in millivolts and
// turned into a unit delay by pp_pkg::unit_delay_ps.
module variable_delay
  import pp_pkg::*;
(
  input  logic       in,
  input  logic [4:0] sel,       // tap, written through JTAG
  input  int         vcon_mv,   // control voltage from the PLL, mV
  output logic       out
);
  int unsigned dly_ps;
  assign dly_ps = sel * unit_delay_ps(vcon_mv);

  initial out = 1'b0;
  // One delayed assignment per input edge, so several edges can be in
  // flight along the line at once.
  always @(posedge in or negedge in) begin
    automatic logic v = in;
    automatic int unsigned d = dly_ps;
    fork
      begin #(d * 1ps) out = v; end
    join_none
  end
endmodule
