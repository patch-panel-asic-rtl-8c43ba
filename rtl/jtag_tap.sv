// JTAG test access port (TAP) controller.
//
// The sixteen-state controller of IEEE 1149.1, advanced by TMS on each
// rising TCK edge.  The chip has no TRST_ pin, so the controller is brought
// to Test-Logic-Reset either by holding TMS high for five TCK cycles or,
// as this design's choice, by the system reset RESET_.  The outputs are
// one-cycle strobes, valid while the controller is in the named state, that
// the register block uses on the next rising TCK edge.
module jtag_tap (
  input  logic tck,
  input  logic tms,
  input  logic rst_n,        // RESET_, asynchronous, active low
  output logic tlr,          // in Test-Logic-Reset
  output logic capture_dr,
  output logic shift_dr,
  output logic update_dr,
  output logic capture_ir,
  output logic shift_ir,
  output logic update_ir
);
  typedef enum logic [3:0] {
    S_TLR, S_RTI, S_SEL_DR, S_CAP_DR, S_SH_DR, S_EX1_DR, S_PA_DR, S_EX2_DR,
    S_UPD_DR, S_SEL_IR, S_CAP_IR, S_SH_IR, S_EX1_IR, S_PA_IR, S_EX2_IR,
    S_UPD_IR
  } tap_state_e;

  tap_state_e state, nxt;

  always_comb begin
    unique case (state)
      S_TLR:     nxt = tms ? S_TLR     : S_RTI;
      S_RTI:     nxt = tms ? S_SEL_DR  : S_RTI;
      S_SEL_DR:  nxt = tms ? S_SEL_IR  : S_CAP_DR;
      S_CAP_DR:  nxt = tms ? S_EX1_DR  : S_SH_DR;
      S_SH_DR:   nxt = tms ? S_EX1_DR  : S_SH_DR;
      S_EX1_DR:  nxt = tms ? S_UPD_DR  : S_PA_DR;
      S_PA_DR:   nxt = tms ? S_EX2_DR  : S_PA_DR;
      S_EX2_DR:  nxt = tms ? S_UPD_DR  : S_SH_DR;
      S_UPD_DR:  nxt = tms ? S_SEL_DR  : S_RTI;
      S_SEL_IR:  nxt = tms ? S_TLR     : S_CAP_IR;
      S_CAP_IR:  nxt = tms ? S_EX1_IR  : S_SH_IR;
      S_SH_IR:   nxt = tms ? S_EX1_IR  : S_SH_IR;
      S_EX1_IR:  nxt = tms ? S_UPD_IR  : S_PA_IR;
      S_PA_IR:   nxt = tms ? S_EX2_IR  : S_PA_IR;
      S_EX2_IR:  nxt = tms ? S_UPD_IR  : S_SH_IR;
      S_UPD_IR:  nxt = tms ? S_SEL_DR  : S_RTI;
      default:   nxt = S_TLR;
    endcase
  end

  always_ff @(posedge tck or negedge rst_n)
    if (!rst_n) state <= S_TLR;
    else        state <= nxt;

  assign tlr        = (state == S_TLR);
  assign capture_dr = (state == S_CAP_DR);
  assign shift_dr   = (state == S_SH_DR);
  assign update_dr  = (state == S_UPD_DR);
  assign capture_ir = (state == S_CAP_IR);
  assign shift_ir   = (state == S_SH_IR);
  assign update_ir  = (state == S_UPD_IR);
endmodule
