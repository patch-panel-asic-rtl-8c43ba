// Checks the phase detector: with the reference leading by d, UP is high
// for d and DOWN stays low; with the oscillator leading, the reverse; with
// ENV low neither output rises.
module tb_phase_detector;
  logic r = 0, v = 0, env = 1, rst_n = 1, up, down;
  int checks = 0, failures = 0;
  realtime t_up, t_dn, w_up, w_dn;
  phase_detector dut (.ref_clk(r), .vco(v), .env, .rst_n, .up, .down);
  always @(posedge up)   t_up = $realtime;
  always @(negedge up)   w_up = $realtime - t_up;
  always @(posedge down) t_dn = $realtime;
  always @(negedge down) w_dn = $realtime - t_dn;
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #1ns rst_n = 0; #9ns rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int d; bit ref_first;
      d = 1 + $urandom % 20; ref_first = 1'($urandom);
      w_up = 0; w_dn = 0;
      #20ns;
      if (ref_first) begin r = 1; #(d * 1ns); v = 1; end
      else           begin v = 1; #(d * 1ns); r = 1; end
      #5ns r = 0; v = 0; #20ns;
      checks++;
      if (ref_first ? (w_up != d * 1ns || w_dn != 0) : (w_dn != d * 1ns || w_up != 0)) begin
        failures++; $display("d=%0d ref_first=%0d w_up=%0t w_dn=%0t", d, ref_first, w_up, w_dn);
      end
    end
    env = 0;
    #10ns r = 1; #2ns checks++; if (up) failures++;
    #8ns r = 0;
    #10ns v = 1; #2ns checks++; if (down) failures++;
    #8ns v = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
