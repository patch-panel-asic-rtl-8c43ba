// JTAG control block of the Patch-Panel ASIC.
//
// A TAP controller, an 8-bit instruction register and the configuration
// registers of both ports.  Instruction and data are shifted in LSB first.
// Instruction bits [7:1] select a data register and bit 0 the mode: 1 writes
// the shifted-in value at Update-DR, 0 only reads it out.  Any code not in
// the register map, and the state after Test-Logic-Reset, selects the 1-bit
// BYPASS register.  Code 8'b0011_0000 reads the SEU flag.
//
// Every register, the instruction register included, is kept in three
// copies with a majority vote (tmr_reg).  The SEU flag is set, and held, when
// any two copies disagree; a register write through JTAG clears it (and
// restores the three copies of the written register).
//
// Capture-DR loads the selected register's present value in both modes, so
// a write also returns the old contents on TDO; Capture-IR loads 8'h01.
// TDO changes on the falling TCK edge.  RESET_ restores all the defaults:
// masks all ones, every delay and amplitude at its maximum, trigger taken on
// the rising clock edge.  The register map, widths and defaults follow the
// chip; resetting the TAP with RESET_ and clearing the SEU flag on any write
// are this design's choices.
module pp_jtag
  import pp_pkg::*;
(
  input  logic    tck,
  input  logic    tms,
  input  logic    tdi,
  output logic    tdo,
  input  logic    rst_n,    // RESET_, asynchronous, active low
  output pp_cfg_t cfg,      // voted register contents
  output logic    seu       // SEU flag
);
  logic tlr, cap_dr, sh_dr, upd_dr, cap_ir, sh_ir, upd_ir;

  jtag_tap u_tap (
    .tck, .tms, .rst_n, .tlr, .capture_dr(cap_dr), .shift_dr(sh_dr),
    .update_dr(upd_dr), .capture_ir(cap_ir), .shift_ir(sh_ir),
    .update_ir(upd_ir));

  // ---------------------------------------------------------------- IR --
  logic [IR_LEN-1:0] ir_sr, ir;
  logic              ir_mm;

  always_ff @(posedge tck or negedge rst_n)
    if (!rst_n)      ir_sr <= '0;
    else if (cap_ir) ir_sr <= 8'h01;
    else if (sh_ir)  ir_sr <= {tdi, ir_sr[IR_LEN-1:1]};

  tmr_reg #(.WIDTH(IR_LEN), .RESET_VAL(OP_BYPASS)) u_ir (
    .clk(tck), .rst_n, .we(upd_ir | tlr), .d(tlr ? OP_BYPASS : ir_sr),
    .q(ir), .mismatch(ir_mm));

  // ------------------------------------------------------------ decode --
  dr_sel_e sel;
  logic    wr_mode;

  always_comb begin
    sel = R_BYPASS;
    if (ir == OP_SEU) sel = R_SEU;
    else begin
      unique case (ir[7:1])
        OP_BCID_MASKA:  sel = R_MASKA;
        OP_BCID_MASKB:  sel = R_MASKB;
        OP_TPG_AMPA:    sel = R_AMPA;
        OP_TPG_AMPB:    sel = R_AMPB;
        OP_TPG_FINEA:   sel = R_FINEA;
        OP_TPG_FINEB:   sel = R_FINEB;
        OP_TPG_COARSEA: sel = R_COARSEA;
        OP_TPG_COARSEB: sel = R_COARSEB;
        OP_SIGNAL_DELA: sel = R_SIGDELA;
        OP_SIGNAL_DELB: sel = R_SIGDELB;
        OP_BCID_DELA:   sel = R_BCIDDELA;
        OP_BCID_DELB:   sel = R_BCIDDELB;
        OP_BCID_GATEA:  sel = R_GATEA;
        OP_BCID_GATEB:  sel = R_GATEB;
        OP_DEBUG_DEL:   sel = R_DEBUG;
        default:        sel = R_BYPASS;
      endcase
    end
  end

  // Write mode only for the writable configuration registers.
  assign wr_mode = ir[0] && (sel != R_BYPASS) && (sel != R_SEU);

  // Length of the selected data register.
  function automatic int unsigned dr_len(input dr_sel_e s);
    unique case (s)
      R_MASKA, R_MASKB: return 16;
      R_AMPA, R_AMPB:   return 4;
      R_BYPASS, R_SEU:  return 1;
      default:          return 5;
    endcase
  endfunction

  // Present value of the selected register, for Capture-DR.
  logic [DR_MAX-1:0] cap_val;
  always_comb begin
    unique case (sel)
      R_MASKA:    cap_val = cfg.a.mask;
      R_MASKB:    cap_val = cfg.b.mask;
      R_AMPA:     cap_val = 16'(cfg.a.tpg_amp);
      R_AMPB:     cap_val = 16'(cfg.b.tpg_amp);
      R_FINEA:    cap_val = 16'(cfg.a.tpg_fine);
      R_FINEB:    cap_val = 16'(cfg.b.tpg_fine);
      R_COARSEA:  cap_val = 16'(cfg.a.tpg_coarse);
      R_COARSEB:  cap_val = 16'(cfg.b.tpg_coarse);
      R_SIGDELA:  cap_val = 16'(cfg.a.sig_del);
      R_SIGDELB:  cap_val = 16'(cfg.b.sig_del);
      R_BCIDDELA: cap_val = 16'(cfg.a.bcid_del);
      R_BCIDDELB: cap_val = 16'(cfg.b.bcid_del);
      R_GATEA:    cap_val = 16'(cfg.a.bcid_gate);
      R_GATEB:    cap_val = 16'(cfg.b.bcid_gate);
      R_DEBUG:    cap_val = 16'(cfg.debug_del);
      R_SEU:      cap_val = 16'(seu);
      default:    cap_val = '0;   // BYPASS captures 0
    endcase
  end

  // ------------------------------------------------------- DR shifting --
  logic [DR_MAX-1:0] dr_sr, dr_shifted;
  always_comb begin
    int unsigned len;
    len = dr_len(sel);
    for (int unsigned i = 0; i < DR_MAX; i++) begin
      if (i + 1 == len)   dr_shifted[i] = tdi;
      else if (i + 1 < len) dr_shifted[i] = dr_sr[i+1];
      else                dr_shifted[i] = 1'b0;
    end
  end

  always_ff @(posedge tck or negedge rst_n)
    if (!rst_n)      dr_sr <= '0;
    else if (cap_dr) dr_sr <= cap_val;
    else if (sh_dr)  dr_sr <= dr_shifted;

  always_ff @(negedge tck or negedge rst_n)
    if (!rst_n) tdo <= 1'b0;
    else        tdo <= sh_ir ? ir_sr[0] : dr_sr[0];

  // ------------------------------------------------- voted registers --
  logic do_wr;
  assign do_wr = upd_dr && wr_mode;

  logic [15:0] mm;   // per-register copy disagreement

  tmr_reg #(.WIDTH(16), .RESET_VAL(PORT_CFG_DEFAULT.mask)) u_maska (
    .clk(tck), .rst_n, .we(do_wr && sel == R_MASKA), .d(dr_sr[15:0]),
    .q(cfg.a.mask), .mismatch(mm[0]));
  tmr_reg #(.WIDTH(16), .RESET_VAL(PORT_CFG_DEFAULT.mask)) u_maskb (
    .clk(tck), .rst_n, .we(do_wr && sel == R_MASKB), .d(dr_sr[15:0]),
    .q(cfg.b.mask), .mismatch(mm[1]));
  tmr_reg #(.WIDTH(4), .RESET_VAL(PORT_CFG_DEFAULT.tpg_amp)) u_ampa (
    .clk(tck), .rst_n, .we(do_wr && sel == R_AMPA), .d(dr_sr[3:0]),
    .q(cfg.a.tpg_amp), .mismatch(mm[2]));
  tmr_reg #(.WIDTH(4), .RESET_VAL(PORT_CFG_DEFAULT.tpg_amp)) u_ampb (
    .clk(tck), .rst_n, .we(do_wr && sel == R_AMPB), .d(dr_sr[3:0]),
    .q(cfg.b.tpg_amp), .mismatch(mm[3]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.tpg_fine)) u_finea (
    .clk(tck), .rst_n, .we(do_wr && sel == R_FINEA), .d(dr_sr[4:0]),
    .q(cfg.a.tpg_fine), .mismatch(mm[4]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.tpg_fine)) u_fineb (
    .clk(tck), .rst_n, .we(do_wr && sel == R_FINEB), .d(dr_sr[4:0]),
    .q(cfg.b.tpg_fine), .mismatch(mm[5]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.tpg_coarse)) u_coarsea (
    .clk(tck), .rst_n, .we(do_wr && sel == R_COARSEA), .d(dr_sr[4:0]),
    .q(cfg.a.tpg_coarse), .mismatch(mm[6]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.tpg_coarse)) u_coarseb (
    .clk(tck), .rst_n, .we(do_wr && sel == R_COARSEB), .d(dr_sr[4:0]),
    .q(cfg.b.tpg_coarse), .mismatch(mm[7]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.sig_del)) u_sigdela (
    .clk(tck), .rst_n, .we(do_wr && sel == R_SIGDELA), .d(dr_sr[4:0]),
    .q(cfg.a.sig_del), .mismatch(mm[8]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.sig_del)) u_sigdelb (
    .clk(tck), .rst_n, .we(do_wr && sel == R_SIGDELB), .d(dr_sr[4:0]),
    .q(cfg.b.sig_del), .mismatch(mm[9]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.bcid_del)) u_bciddela (
    .clk(tck), .rst_n, .we(do_wr && sel == R_BCIDDELA), .d(dr_sr[4:0]),
    .q(cfg.a.bcid_del), .mismatch(mm[10]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.bcid_del)) u_bciddelb (
    .clk(tck), .rst_n, .we(do_wr && sel == R_BCIDDELB), .d(dr_sr[4:0]),
    .q(cfg.b.bcid_del), .mismatch(mm[11]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.bcid_gate)) u_gatea (
    .clk(tck), .rst_n, .we(do_wr && sel == R_GATEA), .d(dr_sr[4:0]),
    .q(cfg.a.bcid_gate), .mismatch(mm[12]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(PORT_CFG_DEFAULT.bcid_gate)) u_gateb (
    .clk(tck), .rst_n, .we(do_wr && sel == R_GATEB), .d(dr_sr[4:0]),
    .q(cfg.b.bcid_gate), .mismatch(mm[13]));
  tmr_reg #(.WIDTH(5), .RESET_VAL(5'd31)) u_debug (
    .clk(tck), .rst_n, .we(do_wr && sel == R_DEBUG), .d(dr_sr[4:0]),
    .q(cfg.debug_del), .mismatch(mm[14]));
  assign mm[15] = ir_mm;

  // ---------------------------------------------------------- SEU flag --
  always_ff @(posedge tck or negedge rst_n)
    if (!rst_n)     seu <= 1'b0;
    else if (do_wr) seu <= 1'b0;
    else if (|mm)   seu <= 1'b1;
endmodule
