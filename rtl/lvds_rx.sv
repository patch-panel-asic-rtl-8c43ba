// Behavioural model of the LVDS receiver.
//
// The real receiver is a differential amplifier followed by two inverter
// stages that turns a 400 mV differential signal at a 1.2 V offset into a
// CMOS level.  Here the pair is given as two logic levels, and the output is
// high when the true input is above the complement (in_p = 1, in_n = 0).
// With no differential signal (both inputs equal) the output is low.  The
// receiver-plus-buffer propagation delay is the parameter DELAY_PS, an
// assumed figure.
module lvds_rx #(
  parameter int unsigned DELAY_PS = 2000
) (
  input  logic in_p,
  input  logic in_n,
  output logic out
);
  logic level;
  assign level = in_p & ~in_n;
  initial out = 1'b0;
  always @(posedge level or negedge level) begin
    automatic logic v = level;
    fork
      begin #(DELAY_PS * 1ps) out = v; end
    join_none
  end
endmodule
