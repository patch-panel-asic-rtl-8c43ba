// Checks one port with the delay lines at a fixed control voltage (unit
// delay u = 781 ps).  Bypass mode: OUT equals the polarity-corrected inputs
// at once.  Monitor outputs O0, O15 and HIT_OR in both modes.  BCID mode:
// for hits on random channels at random times, with random signal, BCID and
// gate delay settings and a random mask, the identified crossings must match
// a model of the timing: the hit reaches the BCID logic SIGNAL_DEL x u late,
// BCID clock edges are E_k = clock edge k + BCID_DEL x u, gate edges
// F_k = E_k + BCID_GATE x u; the hit is reported after E_(k+1) for the first
// E_k after it and after E_(j+1) for the first F_j after it.
module tb_pp_port;
  import pp_pkg::*;
  localparam int NCYC = 3000;
  localparam int U_PS = 781;           // unit delay at 2894 mV
  logic clk = 0, rst_n = 1, pol = 0, bypass = 1, o0, o15, hor;
  logic [NCH-1:0] rx = '0, mask = '1, out;
  logic [4:0] sig_del = 0, bcid_del = 0, bcid_gate = 0;
  int vcon = 2894;
  int checks = 0, failures = 0;
  bit [NCH-1:0] exp_out [NCYC];
  int cyc = 0, n_double = 0, n_masked = 0, n_hits = 0;
  bit run = 0;

  pp_port dut (.clk, .rst_n, .pol, .bypass, .vcon_mv(vcon), .rx, .mask, .sig_del,
               .bcid_del, .bcid_gate, .out, .o0, .o15, .hit_or(hor));

  always #12.5ns clk = ~clk;   // rising edges at 12.5 ns + 25 ns * k
  initial begin #(NCYC * 25ns + 1us); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // cycle index k counts clock edges; sample OUT 5 ns after BCID edge E_k
  always @(posedge clk) begin
    automatic int k = cyc;
    cyc++;
    if (run) begin
      #(bcid_del * U_PS * 1ps + 5ns);
      checks++;
      if (out !== exp_out[k]) begin
        failures++; $display("cycle %0d: out=%h exp=%h", k, out, exp_out[k]);
      end
    end
  end

  task automatic check_mon(input logic [NCH-1:0] h);
    checks++;
    if (o0 !== h[0] || o15 !== h[NCH-1] || hor !== |h) begin
      failures++; $display("monitors wrong for %h", h);
    end
  endtask

  initial begin
    #1ns rst_n = 0; #20ns rst_n = 1;
    // bypass mode, both polarities
    for (int i = 0; i < 40; i++) begin
      logic [NCH-1:0] v; v = NCH'($urandom); pol = 1'(i / 20);
      rx = v; #3ns;
      checks++; if (out !== (v ^ {NCH{pol}})) begin failures++; $display("bypass %h", out); end
      check_mon(v ^ {NCH{pol}});
    end
    pol = 0; rx = '0; bypass = 0;
    #200ns;
    // BCID mode: settings stay fixed during a block of trials
    for (int blk = 0; blk < 4; blk++) begin
      int base0;
      sig_del = 5'($urandom); bcid_del = 5'($urandom); bcid_gate = 5'($urandom);
      pol = 1'(blk % 2); rx = {NCH{pol}};
      mask = (blk == 0) ? '1 : NCH'($urandom | $urandom);
      repeat (10) @(posedge clk);
      run = 1;
      base0 = cyc + 4;
      for (int n = 0; n < 80; n++) begin
        int kb, t_ps, arr, k, j, e0;
        logic [NCH-1:0] ch;
        kb = base0 + n * 8;
        ch = NCH'($urandom) & NCH'($urandom);
        if (ch == 0) ch = 1;
        t_ps = 500 + $urandom % 24000;         // after clock edge kb
        // arrival at BCID logic, relative to clock edge kb
        arr = t_ps + sig_del * U_PS;
        e0 = bcid_del * U_PS;                  // E_k - clock edge k
        // keep 300 ps away from BCID and gate edges
        for (int q = -2; q < 4; q++) begin
          int d1, d2;
          d1 = arr - (q * 25000 + e0); d2 = arr - (q * 25000 + e0 + bcid_gate * U_PS);
          if ((d1 > -300 && d1 < 300) || (d2 > -300 && d2 < 300)) begin arr += 700; t_ps += 700; end
        end
        k = kb - 2; while (k * 25000 + e0 <= kb * 25000 + arr) k++;
        j = kb - 2; while (j * 25000 + e0 + bcid_gate * U_PS <= kb * 25000 + arr) j++;
        for (int c = 0; c < NCH; c++) if (ch[c]) begin
          n_hits++;
          if (mask[c]) begin
            exp_out[k + 1][c] = 1'b1; exp_out[j + 1][c] = 1'b1;
            if (j != k) n_double++;
          end else n_masked++;
        end
        wait (cyc == kb + 1);                  // just after clock edge kb
        #(t_ps * 1ps);
        rx = ch ^ {NCH{pol}}; #1ns check_mon(ch); #3ns rx = {NCH{pol}};
      end
      wait (cyc == base0 + 80 * 8 + 4);
      run = 0;
    end
    checks++; if (n_double == 0 || n_masked == 0) failures++;
    $display("hits=%0d double=%0d masked=%0d", n_hits, n_double, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
