// End-to-end test of the Patch-Panel ASIC at its default configuration.
//
// After RESET_ the PLL locks the delay units (32-unit ring) to 25 ns per
// ring pass.  The test then configures both ports through JTAG, sends hits
// on the LVDS inputs of both ports and compares the identified crossings on
// OUTA / OUTB with a timing model (receiver delay, signal delay, BCID clock
// delay, gate delay, each tap worth one locked unit delay).  It also checks
// bypass mode and polarity inversion, the monitor outputs, the test pulses
// of both ports (trigger edge choice, coarse delay, fine delay, 3 us width,
// amplitude, no output at amplitude 0), the debug delay line, read-back and
// the BYPASS instruction on TDO, and the SEU flag.  Each mechanism is
// counted and one that never happened counts as a failure.
module tb_pp_asic;
  import pp_pkg::*;
  localparam int RX_PS = 2000;            // receiver model delay
  logic [NCH-1:0] ina_p = '0, ina_n = '1, inb_p = '0, inb_n = '1;
  logic [NCH-1:0] outa, outb;
  logic oa0, oa15, ora, ob0, ob15, orb, tpa, tpa_n, tpb, tpb_n, delin = 0, delout;
  logic [14:0] sena, senb;
  logic pol = 0, bypass = 0, clk = 0, tptrig = 0, reset_n = 1;
  logic slenp = 1, enb = 1, env = 1, enp = 0, tdi = 0, tms = 1, tck = 0, tdo;
  logic [1:0] step = 0;
  int vcon_ext = 0, vcon;
  int checks = 0, failures = 0;
  int unsigned u_ps;
  int edge_no = 0;
  int n_lock = 0, n_bcid = 0, n_double = 0, n_masked = 0, n_bypass = 0, n_pol = 0,
      n_tpa = 0, n_tpb = 0, n_tp_off = 0, n_fall = 0, n_debug = 0, n_seu = 0,
      n_jbyp = 0, n_read = 0;

  pp_asic dut (
    .ina_p, .ina_n, .outa, .oa0, .oa15, .ora, .tpulsea(tpa), .tpulsea_n(tpa_n),
    .tpg_src_en_a(sena), .inb_p, .inb_n, .outb, .ob0, .ob15, .orb,
    .tpulseb(tpb), .tpulseb_n(tpb_n), .tpg_src_en_b(senb), .delin, .delout,
    .pol, .bypass, .clk, .tptrig, .reset_n, .slenp, .enb, .env, .enp, .step,
    .vcon_ext_mv(vcon_ext), .vcon_mv(vcon), .tdi, .tms, .tck, .tdo);

  initial forever begin #12.5ns clk = 1; edge_no++; #12.5ns clk = 0; end
  // rising edge number n (n >= 1) is at 25 ns * n - 12.5 ns
  function automatic realtime edge_time(input int n);
    return n * 25ns - 12.5ns;
  endfunction
  initial begin #3ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic fail(input string s);
    failures++; $display("FAIL: %s", s);
  endtask

  // ------------------------------------------------------------ JTAG --
  task automatic tick(input logic m, input logic di, output logic dout);
    tms = m; tdi = di; #50ns; dout = tdo; tck = 1; #50ns tck = 0;
  endtask
  task automatic shift_ir(input logic [7:0] code);
    logic x;
    tick(1, 0, x); tick(1, 0, x); tick(0, 0, x); tick(0, 0, x);
    for (int i = 0; i < 8; i++) tick(i == 7, code[i], x);
    tick(1, 0, x); tick(0, 0, x);
  endtask
  task automatic shift_dr(input int n, input logic [15:0] din, output logic [15:0] dout);
    logic x;
    dout = '0;
    tick(1, 0, x); tick(0, 0, x); tick(0, 0, x);
    for (int i = 0; i < n; i++) begin tick(i == n - 1, din[i], x); dout[i] = x; end
    tick(1, 0, x); tick(0, 0, x);
  endtask
  task automatic jwrite(input logic [6:0] op, input int n, input logic [15:0] v);
    logic [15:0] r;
    shift_ir({op, 1'b1}); shift_dr(n, v, r);
  endtask
  task automatic jread(input logic [6:0] op, input int n, output logic [15:0] r);
    shift_ir({op, 1'b0}); shift_dr(n, 16'h0, r);
  endtask

  // ------------------------------------------------------------ BCID --
  localparam int NCYC = 8192;
  bit [NCH-1:0] exp_a [NCYC], exp_b [NCYC];
  bit run = 0;
  int cyc_a = 0, cyc_b = 0;
  port_cfg_t ca, cb;

  // sample each port's OUT 5 ns after its BCID clock edge; index = clock edge
  always @(posedge clk) begin
    automatic int k = edge_no;
    if (run && k < NCYC) begin
      #(ca.bcid_del * u_ps * 1ps + 5ns);
      checks++;
      if (outa !== exp_a[k]) begin fail($sformatf("A edge %0d out=%h exp=%h", k, outa, exp_a[k])); end
    end
  end
  always @(posedge clk) begin
    automatic int k = edge_no;
    if (run && k < NCYC) begin
      #(cb.bcid_del * u_ps * 1ps + 5ns);
      checks++;
      if (outb !== exp_b[k]) begin fail($sformatf("B edge %0d out=%h exp=%h", k, outb, exp_b[k])); end
    end
  end

  // expected crossings for a hit entering the chip t_ps after clock edge kb
  task automatic predict(input port_cfg_t c, input int kb, inout int t_ps,
                         output int k, output int j);
    int arr, e0, g;
    arr = t_ps + RX_PS + c.sig_del * u_ps;
    e0 = c.bcid_del * u_ps; g = c.bcid_gate * u_ps;
    for (int q = -2; q < 4; q++) begin
      int d1, d2;
      d1 = arr - (q * 25000 + e0); d2 = arr - (q * 25000 + e0 + g);
      if ((d1 > -500 && d1 < 500) || (d2 > -500 && d2 < 500)) begin arr += 1100; t_ps += 1100; end
    end
    k = kb - 2; while (k * 25000 + e0 <= kb * 25000 + arr) k++;
    j = kb - 2; while (j * 25000 + e0 + g <= kb * 25000 + arr) j++;
  endtask

  // ------------------------------------------------------ test pulses --
  realtime ta_rise, ta_fall, tb_rise, tb_fall;
  always @(posedge tpa) ta_rise = $realtime;
  always @(negedge tpa) ta_fall = $realtime;
  always @(posedge tpb) tb_rise = $realtime;
  always @(negedge tpb) tb_fall = $realtime;

  function automatic bit near(input realtime a, input realtime b, input realtime tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    logic [15:0] r;
    // ---------------- reset and PLL lock
    #3ns reset_n = 0; #200ns reset_n = 1;
    #20us;
    u_ps = unit_delay_ps(vcon);
    checks++;
    if (32 * u_ps < 24500 || 32 * u_ps > 25500) fail($sformatf("PLL unit %0d ps", u_ps));
    else n_lock++;
    $display("locked: VCON %0d mV, unit delay %0d ps", vcon, u_ps);

    // ---------------- JTAG: defaults, read-back, bypass instruction
    tick(0, 0, r[0]);
    jread(OP_SIGNAL_DELA, 5, r);
    checks++; if (r != 31) fail("default SIGNAL_DELA"); else n_read++;
    shift_ir(8'h00); shift_dr(6, 16'b101101, r);
    checks++; if (r[5:0] != 6'b011010) fail("BYPASS instruction"); else n_jbyp++;

    ca = PORT_CFG_DEFAULT; cb = PORT_CFG_DEFAULT;
    ca.sig_del = 5'd4;  ca.bcid_del = 5'd10; ca.bcid_gate = 5'd16; ca.mask = 16'hF7FF;
    cb.sig_del = 5'd12; cb.bcid_del = 5'd3;  cb.bcid_gate = 5'd25; cb.mask = 16'hFFFF ^ 16'h0011;
    jwrite(OP_SIGNAL_DELA, 5, 16'(ca.sig_del));  jwrite(OP_SIGNAL_DELB, 5, 16'(cb.sig_del));
    jwrite(OP_BCID_DELA, 5, 16'(ca.bcid_del));   jwrite(OP_BCID_DELB, 5, 16'(cb.bcid_del));
    jwrite(OP_BCID_GATEA, 5, 16'(ca.bcid_gate)); jwrite(OP_BCID_GATEB, 5, 16'(cb.bcid_gate));
    jwrite(OP_BCID_MASKA, 16, ca.mask);          jwrite(OP_BCID_MASKB, 16, cb.mask);
    jread(OP_BCID_MASKB, 16, r);
    checks++; if (r != cb.mask) fail("MASKB read-back"); else n_read++;

    // ---------------- BCID on both ports
    repeat (5) @(posedge clk);
    begin
      int base0;
      base0 = edge_no + 4;
      checks++; if (base0 + 120 * 8 + 8 >= NCYC) fail("expectation table too short");
      @(posedge clk); #1ns; run = 1;
      for (int n = 0; n < 120; n++) begin
        int kb, ta, tb, ka, ja, kb2, jb;
        logic [NCH-1:0] cha, chb;
        kb = base0 + n * 8;
        cha = NCH'($urandom) & NCH'($urandom); if (cha == 0) cha = 16'h0800;
        chb = NCH'($urandom) & NCH'($urandom); if (chb == 0) chb = 16'h0010;
        ta = 1000 + $urandom % 22000; tb = 1000 + $urandom % 22000;
        predict(ca, kb, ta, ka, ja);
        predict(cb, kb, tb, kb2, jb);
        for (int c = 0; c < NCH; c++) begin
          if (cha[c]) begin
            if (ca.mask[c]) begin
              exp_a[ka + 1][c] = 1; exp_a[ja + 1][c] = 1; n_bcid++;
              if (ja != ka) n_double++;
            end else n_masked++;
          end
          if (chb[c]) begin
            if (cb.mask[c]) begin
              exp_b[kb2 + 1][c] = 1; exp_b[jb + 1][c] = 1; n_bcid++;
              if (jb != kb2) n_double++;
            end else n_masked++;
          end
        end
        wait (edge_no == kb);
        fork
          begin #(ta * 1ps); ina_p = cha; ina_n = ~cha; #4ns ina_p = '0; ina_n = '1; end
          begin #(tb * 1ps); inb_p = chb; inb_n = ~chb; #4ns inb_p = '0; inb_n = '1; end
        join
      end
      wait (edge_no == base0 + 120 * 8 + 4);
      run = 0;
      #100ns;
    end

    // ---------------- bypass and polarity
    bypass = 1;
    for (int i = 0; i < 20; i++) begin
      logic [NCH-1:0] va, vb;
      pol = 1'(i / 10);
      va = NCH'($urandom); vb = NCH'($urandom);
      ina_p = va; ina_n = ~va; inb_p = vb; inb_n = ~vb;
      #(RX_PS * 1ps + 1ns);
      checks++;
      if (outa !== (va ^ {NCH{pol}}) || outb !== (vb ^ {NCH{pol}}))
        fail("bypass output");
      else begin n_bypass++; if (pol) n_pol++; end
      checks++;
      if (oa0 !== (va[0] ^ pol) || oa15 !== (va[15] ^ pol) || ora !== |(va ^ {NCH{pol}}) ||
          ob0 !== (vb[0] ^ pol) || ob15 !== (vb[15] ^ pol) || orb !== |(vb ^ {NCH{pol}}))
        fail("monitor outputs");
      #10ns;
    end
    bypass = 0; pol = 0; ina_p = '0; ina_n = '1; inb_p = '0; inb_n = '1;

    // ---------------- test pulses
    // A: rising edge, coarse 3, fine 8, amplitude 9.  B: amplitude 0.
    jwrite(OP_TPG_COARSEA, 5, 16'b1_0011); jwrite(OP_TPG_FINEA, 5, 16'd8);
    jwrite(OP_TPG_AMPA, 4, 16'd9);         jwrite(OP_TPG_AMPB, 4, 16'd0);
    jwrite(OP_TPG_COARSEB, 5, 16'b0_1100); jwrite(OP_TPG_FINEB, 5, 16'd0);
    for (int pass = 0; pass < 2; pass++) begin
      int e; realtime exp_a_t, exp_b_t;
      @(posedge clk); #5ns; e = edge_no;       // trigger 5 ns after edge e
      tptrig = 1; #40ns tptrig = 0;
      // A: sampled at rising edge e+1, pulse at edge e+1+1+3, then fine 8 units
      exp_a_t = edge_time(e + 5) + 8 * u_ps * 1ps;
      // B: sampled at falling edge after e, re-timed at e+1, coarse 12 -> 8
      exp_b_t = edge_time(e + 1 + 1 + 8);
      #3.5us;
      checks++;
      if (!near(ta_rise, exp_a_t, 0.1ns) || !near(ta_fall - ta_rise, 3us, 0.1ns) ||
          sena !== 15'h01FF)
        fail($sformatf("TP A rise %0t exp %0t width %0t en %h", ta_rise, exp_a_t, ta_fall - ta_rise, sena));
      else n_tpa++;
      if (pass == 0) begin
        checks++;
        if (tpb !== 1'b0 || tpb_n !== 1'b0 || senb !== '0) fail("TP B with amplitude 0");
        else n_tp_off++;
        jwrite(OP_TPG_AMPB, 4, 16'd15);
      end else begin
        checks++;
        if (!near(tb_rise, exp_b_t, 0.1ns) || !near(tb_fall - tb_rise, 3us, 0.1ns) ||
            senb !== 15'h7FFF)
          fail($sformatf("TP B rise %0t exp %0t", tb_rise, exp_b_t));
        else begin n_tpb++; n_fall++; end
      end
      checks++; if (tpa_n !== 1'b1 || tpa !== 1'b0) fail("TP A idle levels");
    end

    // ---------------- debug delay line
    jwrite(OP_DEBUG_DEL, 5, 16'd20);
    for (int i = 0; i < 4; i++) begin
      realtime t0, t1;
      #100ns delin = ~delin; t0 = $realtime;
      @(delout); t1 = $realtime;
      checks++;
      if (!near(t1 - t0, 20 * u_ps * 1ps, 0.05ns)) fail($sformatf("debug delay %0t", t1 - t0));
      else n_debug++;
    end

    // ---------------- SEU flag
    jread(OP_SEU[7:1], 1, r);
    checks++; if (r[0] !== 1'b0) fail("SEU set without upset");
    force dut.u_jtag.u_gatea.c0 = ~ca.bcid_gate;
    #1ns release dut.u_jtag.u_gatea.c0;
    checks++; if (dut.cfg.a.bcid_gate !== ca.bcid_gate) fail("vote");
    jread(OP_SEU[7:1], 1, r);
    checks++; if (r[0] !== 1'b1) fail("SEU not flagged"); else n_seu++;
    jwrite(OP_BCID_GATEA, 5, 16'(ca.bcid_gate));
    jread(OP_SEU[7:1], 1, r);
    checks++; if (r[0] !== 1'b0) fail("SEU not cleared");

    // ---------------- every mechanism must have happened
    $display("lock=%0d bcid=%0d double=%0d masked=%0d bypass=%0d pol=%0d tpa=%0d tpb=%0d tp_off=%0d fall=%0d debug=%0d seu=%0d jbypass=%0d read=%0d",
             n_lock, n_bcid, n_double, n_masked, n_bypass, n_pol, n_tpa, n_tpb, n_tp_off,
             n_fall, n_debug, n_seu, n_jbyp, n_read);
    begin
      int m [14];
      m = '{n_lock, n_bcid, n_double, n_masked, n_bypass, n_pol, n_tpa, n_tpb,
                     n_tp_off, n_fall, n_debug, n_seu, n_jbyp, n_read};
      for (int i = 0; i < 14; i++) begin checks++; if (m[i] == 0) fail($sformatf("mechanism %0d never seen", i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
