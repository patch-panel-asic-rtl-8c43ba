// Checks the PLL model: for each ring length (STEP 0..3 -> 32, 28, 24, 20
// units), starting from VCON = VDD after RESET_ (SLENP high), the loop must
// settle so that the ring delay (units x unit delay) is 25 ns within 2 %,
// the ring oscillator runs at 20 MHz and VCON stays steady.  Also checks
// that ENP holds VCON at VDD when SLENP is low and that with ENB low VCON
// follows the externally applied voltage.
module tb_pll;
  import pp_pkg::*;
  logic clk = 0, rst_n = 1, slenp = 1, enb = 1, env = 1, enp = 0, vcro;
  logic [1:0] step = 0;
  int vcon_ext = 2000, vcon;
  int checks = 0, failures = 0;
  realtime t_last, per;
  pll dut (.clk, .rst_n, .step, .slenp, .enb, .env, .enp, .vcon_ext_mv(vcon_ext),
           .vcon_mv(vcon), .vcro);
  always #12.5ns clk = ~clk;
  always @(posedge vcro) begin per = $realtime - t_last; t_last = $realtime; end
  initial begin #400us; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int s = 0; s < 4; s++) begin
      int units, ring_ps, v0;
      step = 2'(s); units = 32 - 4 * s;
      rst_n = 0; #100ns;
      checks++; if (vcon != VDD_MV) begin failures++; $display("no VDD start"); end
      rst_n = 1;
      #20us;
      v0 = vcon;
      ring_ps = units * (375 + (3300 - vcon));
      checks++;
      if (ring_ps < 24500 || ring_ps > 25500) begin
        failures++; $display("step %0d: ring %0d ps vcon %0d", s, ring_ps, vcon);
      end
      checks++;
      if (per < 49.5ns || per > 50.5ns) begin failures++; $display("step %0d: period %0t", s, per); end
      #5us;
      checks++;
      if (vcon - v0 > 5 || v0 - vcon > 5) begin failures++; $display("step %0d: drift %0d -> %0d", s, v0, vcon); end
      $display("step %0d: vcon %0d mV, unit %0d ps, ring period %0t", s, vcon, 375 + 3300 - vcon, per);
    end
    slenp = 0; enp = 1; #2us;
    checks++; if (vcon != VDD_MV) failures++;
    enp = 0; enb = 0; vcon_ext = 1800; #1us;
    checks++; if (vcon != 1800) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
