// Shared types and constants of the Patch-Panel ASIC.
//
// Holds the JTAG instruction codes, the per-port configuration record that
// the JTAG block hands to the signal paths, the register defaults applied by
// RESET_, and the delay-unit model used by the behavioural delay lines.
// The instruction codes, register widths and defaults are the chip's own;
// the voltage-to-delay relation of a delay unit is a modelling choice.
package pp_pkg;

  localparam int unsigned NCH      = 16;  // channels per port (one ASD board)
  localparam int unsigned NTAPS    = 32;  // delay units per variable delay
  localparam int unsigned IR_LEN   = 8;   // JTAG instruction length
  localparam int unsigned DR_MAX   = 16;  // longest data register (mask)

  // Instruction codes: bits [7:1] select the register, bit 0 selects
  // write (1) or read (0).  SEU is a full 8-bit read-only code.
  localparam logic [6:0] OP_BCID_MASKA  = 7'b0000_010;
  localparam logic [6:0] OP_BCID_MASKB  = 7'b0000_011;
  localparam logic [6:0] OP_TPG_AMPA    = 7'b0000_101;
  localparam logic [6:0] OP_TPG_AMPB    = 7'b0000_110;
  localparam logic [6:0] OP_TPG_FINEA   = 7'b0001_000;
  localparam logic [6:0] OP_TPG_FINEB   = 7'b0001_001;
  localparam logic [6:0] OP_TPG_COARSEA = 7'b0001_011;
  localparam logic [6:0] OP_TPG_COARSEB = 7'b0001_100;
  localparam logic [6:0] OP_SIGNAL_DELA = 7'b0001_110;
  localparam logic [6:0] OP_SIGNAL_DELB = 7'b0001_111;
  localparam logic [6:0] OP_BCID_DELA   = 7'b0010_001;
  localparam logic [6:0] OP_BCID_DELB   = 7'b0010_010;
  localparam logic [6:0] OP_BCID_GATEA  = 7'b0010_100;
  localparam logic [6:0] OP_BCID_GATEB  = 7'b0010_101;
  localparam logic [6:0] OP_DEBUG_DEL   = 7'b0010_111;
  localparam logic [7:0] OP_SEU         = 8'b0011_0000;
  localparam logic [7:0] OP_BYPASS      = 8'hFF;

  // Data registers addressed by the instruction register.
  typedef enum logic [4:0] {
    R_BYPASS, R_MASKA, R_MASKB, R_AMPA, R_AMPB, R_FINEA, R_FINEB,
    R_COARSEA, R_COARSEB, R_SIGDELA, R_SIGDELB, R_BCIDDELA, R_BCIDDELB,
    R_GATEA, R_GATEB, R_DEBUG, R_SEU
  } dr_sel_e;

  // Settings of one port (one ASD board).
  typedef struct packed {
    logic [NCH-1:0] mask;       // BCID_MASK: 1 = channel enabled
    logic [3:0]     tpg_amp;    // TPG_AMP: test pulse amplitude 0..15
    logic [4:0]     tpg_fine;   // TPG_FINE: fine delay tap
    logic [4:0]     tpg_coarse; // TPG_COARSE: [4] rising edge, [3:0] clocks
    logic [4:0]     sig_del;    // SIGNAL_DEL: hit signal delay tap
    logic [4:0]     bcid_del;   // BCID_DEL: BCID clock delay tap
    logic [4:0]     bcid_gate;  // BCID_GATE: gate clock delay tap
  } port_cfg_t;

  typedef struct packed {
    port_cfg_t  a;
    port_cfg_t  b;
    logic [4:0] debug_del;      // DEBUG_DEL: delay tap of the debug line
  } pp_cfg_t;

  localparam port_cfg_t PORT_CFG_DEFAULT = '{
    mask: '1, tpg_amp: 4'd15, tpg_fine: 5'd31, tpg_coarse: 5'b1_1111,
    sig_del: 5'd31, bcid_del: 5'd31, bcid_gate: 5'd31};

  // Delay-unit model: a unit delay of 375 ps at VCON = VDD (32 units give
  // 12 ns), growing by 1 ps for every mV VCON falls below VDD.
  localparam int VDD_MV         = 3300;
  localparam int UNIT_MIN_PS    = 375;
  localparam int UNIT_PS_PER_MV = 1;

  function automatic int unsigned unit_delay_ps(input int vcon_mv);
    int v;
    v = (vcon_mv > VDD_MV) ? VDD_MV : ((vcon_mv < 0) ? 0 : vcon_mv);
    return int'(UNIT_MIN_PS + UNIT_PS_PER_MV * (VDD_MV - v));
  endfunction

endpackage
