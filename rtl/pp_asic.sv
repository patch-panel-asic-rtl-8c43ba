// Patch-Panel ASIC: timing alignment and bunch-crossing identification for
// two 16-channel wire or strip front-end boards.
//
// Port A and port B each receive sixteen LVDS hit signals (lvds_rx), correct
// their polarity, delay them by a programmable sub-nanosecond amount and
// assign each hit to a 25 ns bunch crossing of the 40 MHz clock (pp_port).
// All delays are tapped chains of the same voltage-controlled delay unit;
// one PLL (pll) sets the control voltage VCON so that the units keep a fixed
// delay whatever the supply and temperature.  Each port also has a test
// pulse generator: a trigger on TPTRIG, after a coarse delay of 0-8 clocks
// (tpg_coarse) and a fine delay of 0-25 ns (variable_delay), produces a
// 3 us differential current pulse of programmable amplitude (tpg_steer; the
// analog current sources are outside this RTL, so their enables are
// outputs).  A spare delay line takes DELIN to DELOUT for measurement.
// Everything is configured through JTAG (pp_jtag).
//
// Port list follows the chip's pin list; differential pairs are split into
// _p / _n vectors, and VCON, an analog pin, is carried as an integer in mV:
// VCON_MV is its value, VCON_EXT_MV the voltage applied from outside when
// ENB is low.  TPG_SRC_EN_x are the per-source switch controls of the
// analog output stage, which is not part of this RTL.
module pp_asic
  import pp_pkg::*;
(
  // Port A
  input  logic [NCH-1:0] ina_p,
  input  logic [NCH-1:0] ina_n,
  output logic [NCH-1:0] outa,
  output logic           oa0,
  output logic           oa15,
  output logic           ora,
  output logic           tpulsea,
  output logic           tpulsea_n,
  output logic [14:0]    tpg_src_en_a,
  // Port B
  input  logic [NCH-1:0] inb_p,
  input  logic [NCH-1:0] inb_n,
  output logic [NCH-1:0] outb,
  output logic           ob0,
  output logic           ob15,
  output logic           orb,
  output logic           tpulseb,
  output logic           tpulseb_n,
  output logic [14:0]    tpg_src_en_b,
  // Common control
  input  logic           delin,
  output logic           delout,
  input  logic           pol,
  input  logic           bypass,
  input  logic           clk,
  input  logic           tptrig,
  input  logic           reset_n,
  input  logic           slenp,
  input  logic           enb,
  input  logic           env,
  input  logic           enp,
  input  logic [1:0]     step,
  input  int             vcon_ext_mv,
  output int             vcon_mv,
  // JTAG
  input  logic           tdi,
  input  logic           tms,
  input  logic           tck,
  output logic           tdo
);
  pp_cfg_t        cfg;
  logic           seu, vcro;
  logic [NCH-1:0] rxa, rxb;
  logic           tpa_c, tpb_c, tpa_f, tpb_f;

  pp_jtag u_jtag (.tck, .tms, .tdi, .tdo, .rst_n(reset_n), .cfg, .seu);

  pll u_pll (
    .clk, .rst_n(reset_n), .step, .slenp, .enb, .env, .enp, .vcon_ext_mv,
    .vcon_mv, .vcro);

  for (genvar i = 0; i < NCH; i++) begin : g_rx
    lvds_rx u_rxa (.in_p(ina_p[i]), .in_n(ina_n[i]), .out(rxa[i]));
    lvds_rx u_rxb (.in_p(inb_p[i]), .in_n(inb_n[i]), .out(rxb[i]));
  end

  pp_port u_port_a (
    .clk, .rst_n(reset_n), .pol, .bypass, .vcon_mv, .rx(rxa),
    .mask(cfg.a.mask), .sig_del(cfg.a.sig_del), .bcid_del(cfg.a.bcid_del),
    .bcid_gate(cfg.a.bcid_gate), .out(outa), .o0(oa0), .o15(oa15),
    .hit_or(ora));
  pp_port u_port_b (
    .clk, .rst_n(reset_n), .pol, .bypass, .vcon_mv, .rx(rxb),
    .mask(cfg.b.mask), .sig_del(cfg.b.sig_del), .bcid_del(cfg.b.bcid_del),
    .bcid_gate(cfg.b.bcid_gate), .out(outb), .o0(ob0), .o15(ob15),
    .hit_or(orb));

  // Test pulse generators
  tpg_coarse u_tpc_a (
    .clk, .rst_n(reset_n), .tptrig, .edge_rise(cfg.a.tpg_coarse[4]),
    .coarse(cfg.a.tpg_coarse[3:0]), .pulse(tpa_c));
  tpg_coarse u_tpc_b (
    .clk, .rst_n(reset_n), .tptrig, .edge_rise(cfg.b.tpg_coarse[4]),
    .coarse(cfg.b.tpg_coarse[3:0]), .pulse(tpb_c));
  variable_delay u_tpf_a (.in(tpa_c), .sel(cfg.a.tpg_fine), .vcon_mv, .out(tpa_f));
  variable_delay u_tpf_b (.in(tpb_c), .sel(cfg.b.tpg_fine), .vcon_mv, .out(tpb_f));
  tpg_steer u_tps_a (
    .pulse(tpa_f), .amp(cfg.a.tpg_amp), .pol, .src_en(tpg_src_en_a),
    .tpulse(tpulsea), .tpulse_n(tpulsea_n));
  tpg_steer u_tps_b (
    .pulse(tpb_f), .amp(cfg.b.tpg_amp), .pol, .src_en(tpg_src_en_b),
    .tpulse(tpulseb), .tpulse_n(tpulseb_n));

  // Debug delay line
  variable_delay u_debug (.in(delin), .sel(cfg.debug_del), .vcon_mv, .out(delout));
endmodule
