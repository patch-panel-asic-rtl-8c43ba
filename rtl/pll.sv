// Behavioural model of the delay-locked PLL (VCRO, charge pump, filter).
//
// The loop keeps the delay units of all variable delays at a known value.
// The voltage-controlled ring oscillator is a chain of 20, 24, 28 or 32 of
// the same delay units closed by an inverter (STEP = 0..3 selects 32, 28,
// 24, 20), so it runs at 1 / (2 x ring delay).  The phase detector
// (synthesizable, phase_detector) compares it with the 20 MHz reference
// made from the 40 MHz clock (clk_div2).  UP raises and DOWN lowers VCON,
// so in lock one pass around the ring takes 25 ns and one unit delays by
// 25 ns / units.
//
// Analog parts are modelled in fixed time steps of STEP_PS.  The charge pump
// sources or sinks ICP_UA into the loop capacitor CAP_PF (100 pF, off chip);
// while a pump pulse lasts, the filter resistor adds +-RI_MV to the voltage
// seen by the ring.  The ring accumulates phase at a rate set by the unit
// delay (pp_pkg::unit_delay_ps) and toggles its output at each half turn.
// The inverter delay is not modelled.
//
// Control pins: ENB low disconnects the pump and VCON follows VCON_EXT_MV
// (driven from outside); ENV low disables the phase detector; ENP high
// holds VCON at VDD; SLENP high starts VCON from VDD when RESET_ is
// released and makes ENP ineffective.  With SLENP low the start voltage is
// undefined on the chip; the model starts from VDD / 2.
// VCON_MV is the capacitor voltage, passed to every variable delay.
module pll
  import pp_pkg::*;
#(
  parameter int unsigned STEP_PS = 50,
  parameter real         ICP_UA  = 50.0,
  parameter real         CAP_PF  = 100.0,
  parameter real         RI_MV   = 200.0
) (
  input  logic       clk,          // 40 MHz system clock
  input  logic       rst_n,        // RESET_
  input  logic [1:0] step,         // STEP1..0
  input  logic       slenp,
  input  logic       enb,
  input  logic       env,
  input  logic       enp,
  input  int         vcon_ext_mv,  // VCON driven from outside (ENB low)
  output int         vcon_mv,      // VCON line
  output logic       vcro          // ring oscillator output
);
  logic ref_clk, up, down;

  clk_div2 u_div (.clk, .rst_n, .q(ref_clk));
  phase_detector u_pd (.ref_clk, .vco(vcro), .env, .rst_n, .up, .down);

  real v_cap, v_eff, phase, half_ps;
  int unsigned units;

  // Change of the capacitor voltage in mV per time step of pump current:
  // I x dt / C with I in uA, dt in ps, C in pF gives 1e-3 mV.
  localparam real DV_MV = ICP_UA * real'(STEP_PS) / CAP_PF * 1.0e-3;

  initial begin
    v_cap = real'(VDD_MV) / 2.0;
    phase = 0.0;
    vcro  = 1'b0;
    forever begin
      #(STEP_PS * 1ps);
      units = 32 - 4 * step;
      if (!enb)                 v_cap = real'(vcon_ext_mv);
      else if (slenp && !rst_n) v_cap = real'(VDD_MV);
      else if (!slenp && enp)   v_cap = real'(VDD_MV);
      else if (up && !down)     v_cap = v_cap + DV_MV;
      else if (down && !up)     v_cap = v_cap - DV_MV;
      if (v_cap > real'(VDD_MV)) v_cap = real'(VDD_MV);
      if (v_cap < 0.0)           v_cap = 0.0;
      v_eff = v_cap;
      if (enb && up && !down)   v_eff = v_cap + RI_MV;
      if (enb && down && !up)   v_eff = v_cap - RI_MV;
      half_ps = real'(units) * real'(unit_delay_ps(int'(v_eff)));
      phase = phase + real'(STEP_PS) / half_ps;
      if (phase >= 1.0) begin
        phase = phase - 1.0;
        vcro  = ~vcro;
      end
    end
  end

  assign vcon_mv = int'(v_cap);
endmodule
