// Exhaustive check of the test pulse output control: thermometer code of
// the amplitude, pin selection by pulse and polarity, no output at AMP = 0.
module tb_tpg_steer;
  logic pulse, pol, tp, tpn;
  logic [3:0] amp;
  logic [14:0] en;
  int checks = 0, failures = 0;
  tpg_steer dut (.pulse, .amp, .pol, .src_en(en), .tpulse(tp), .tpulse_n(tpn));
  initial begin
    for (int a = 0; a < 16; a++)
      for (int p = 0; p < 2; p++)
        for (int u = 0; u < 2; u++) begin
          logic [14:0] een; logic etp, etpn; int n;
          amp = 4'(a); pol = 1'(p); pulse = 1'(u); #1ns;
          een = '0; for (int i = 0; i < a; i++) een[i] = 1'b1;
          // POL low: TPULSE positive logic; POL high: TPULSE_ positive logic
          etp  = (a != 0) && ((p == 0) ? (u == 1) : (u == 0));
          etpn = (a != 0) && !etp;
          n = 0; for (int i = 0; i < 15; i++) n += en[i];
          checks++;
          if (en !== een || tp !== etp || tpn !== etpn || n != a) begin
            failures++; $display("a=%0d p=%0d u=%0d en=%b tp=%b tpn=%b", a, p, u, en, tp, tpn);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
