// Checks bunch-crossing identification of one channel against a timing
// model worked out from the circuit's clocking.  BCID clock edges are at
// e_k = k x 25 ns + 3 ns and gate clock edges g later.  For a hit at t:
// with e_k the first BCID edge after t, OUT is high in the cycle after
// e_(k+1); with f_j = e_j + g the first gate edge after t, OUT is high in
// the cycle after e_(j+1).  A hit in (e_(k-1), e_(k-1) + g) is so reported in
// two successive crossings, which is what makes the effective gate 25 ns + g
// wide.  Masked hits give nothing.  Hits are spaced at least six clocks.
module tb_bcid_channel;
  localparam int NCYC = 2400;
  logic hit = 0, mask = 1, bclk = 0, gclk = 0, rst_n = 1, out;
  int checks = 0, failures = 0;
  int unsigned g_ps;
  bit exp_out [NCYC];
  int cyc = 0, n_double = 0, n_single = 0, n_masked = 0;

  bcid_channel dut (.hit, .mask, .bclk, .gclk, .rst_n, .out);

  // BCID clock: rising edges at k*25 ns + 3 ns
  initial begin #3ns; forever begin bclk = 1; #12.5ns bclk = 0; #12.5ns; end end
  always @(posedge bclk or negedge bclk) gclk <= #(g_ps * 1ps) bclk;
  initial begin #(NCYC * 25ns + 200ns); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // sample OUT in the middle of each cycle after edge e_k (cycle index k)
  always @(posedge bclk) begin
    #12ns;
    if (cyc >= 4 && cyc < NCYC) begin
      checks++;
      if (out !== exp_out[cyc]) begin
        failures++; $display("cycle %0d: out=%b exp=%b", cyc, out, exp_out[cyc]);
      end
    end
    cyc++;
  end

  initial begin
    g_ps = 12000;
    #1ns rst_n = 0; #2ns rst_n = 1;
    for (int n = 0; n < NCYC / 8 - 2; n++) begin
      int base_k, t_ps, k, j; bit m;
      base_k = 8 + n * 8;
      // hit time inside cycle (e_base, e_base+25ns), away from clock edges
      t_ps = 500 + $urandom % 24000;
      if (t_ps > int'(g_ps) - 400 && t_ps < int'(g_ps) + 400) t_ps = int'(g_ps) + 600;
      m = ($urandom % 6) != 0;
      if (n == 300) g_ps = 5000 + $urandom % 15000;   // other gate delay
      // t = e_base + t_ps; first BCID edge after t is e_(base+1)
      k = base_k + 1;
      j = (t_ps < int'(g_ps)) ? base_k : base_k + 1;
      if (m) begin
        exp_out[k + 1] = 1; exp_out[j + 1] = 1;
        if (j + 1 != k + 1) n_double++; else n_single++;
      end else n_masked++;
      wait (cyc == base_k);              // 13 ns before e_base
      #(13ns + t_ps * 1ps);
      mask = m; hit = 1; #4ns hit = 0;
    end
    wait (cyc == NCYC);
    checks++; if (n_double == 0 || n_single == 0 || n_masked == 0) failures++;
    $display("single=%0d double=%0d masked=%0d", n_single, n_double, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
