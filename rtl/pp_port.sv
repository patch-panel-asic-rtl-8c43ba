// Signal path of one port (one 16-channel ASD board).
//
// The receiver outputs are first corrected for the board's polarity: POL
// low (anode wires) passes them, POL high (cathode strips) inverts them, so
// a hit is high from here on.  In normal mode (BYPASS low) each channel is
// delayed by its own variable delay (all set by SIGNAL_DEL), masked and
// bunch-crossing identified (bcid_channel).  The BCID clock is the 40 MHz
// clock after the port's BCID delay and the gate clock is the BCID clock
// after the gate delay; both delays, like the signal delay, are common to the
// sixteen channels of the port.  With BYPASS high the polarity-corrected
// hits go straight to OUT, asynchronously.  Whatever the mode, O0 and O15
// carry channels 0 and 15 and HIT_OR the OR of all channels, taken after the
// polarity correction and before any delay (the tap point of these monitor
// outputs is this design's choice).  OUT of an identified hit is a pulse of
// one BCID-clock period, changing just after a BCID clock edge.
module pp_port
  import pp_pkg::*;
(
  input  logic           clk,       // 40 MHz system clock
  input  logic           rst_n,     // RESET_
  input  logic           pol,       // POL
  input  logic           bypass,    // BYPASS
  input  int             vcon_mv,   // VCON from the PLL
  input  logic [NCH-1:0] rx,        // LVDS receiver outputs
  input  logic [NCH-1:0] mask,      // BCID_MASK
  input  logic [4:0]     sig_del,   // SIGNAL_DEL
  input  logic [4:0]     bcid_del,  // BCID_DEL
  input  logic [4:0]     bcid_gate, // BCID_GATE
  output logic [NCH-1:0] out,       // OUTx0..15
  output logic           o0,        // Ox0
  output logic           o15,       // Ox15
  output logic           hit_or     // ORx
);
  logic [NCH-1:0] hit, hit_d, bcid_out;
  logic           bclk, gclk;

  assign hit = rx ^ {NCH{pol}};

  variable_delay u_bcid_del (.in(clk),  .sel(bcid_del),  .vcon_mv, .out(bclk));
  variable_delay u_gate_del (.in(bclk), .sel(bcid_gate), .vcon_mv, .out(gclk));

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    variable_delay u_sig (.in(hit[i]), .sel(sig_del), .vcon_mv, .out(hit_d[i]));
    bcid_channel u_bcid (
      .hit(hit_d[i]), .mask(mask[i]), .bclk, .gclk, .rst_n, .out(bcid_out[i]));
  end

  assign out    = bypass ? hit : bcid_out;
  assign o0     = hit[0];
  assign o15    = hit[NCH-1];
  assign hit_or = |hit;
endmodule
