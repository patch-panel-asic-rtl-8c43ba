// Variable delay range and resolution for the four ring lengths, measured
// on the whole chip through the debug delay line (DELIN -> DELOUT).  For
// STEP = 0..3 the PLL is reset and left to lock, DEBUG_DEL is set through
// JTAG to several taps, and the delay of an edge is measured.  The delay per
// tap must be 25 ns / (32, 28, 24, 20 units) within 2 %, the delay must grow
// linearly with the tap, and with 28 units or fewer the 31-tap range must
// exceed 25 ns.
module tb_delay_range;
  import pp_pkg::*;
  logic [NCH-1:0] ina_p = '0, ina_n = '1, inb_p = '0, inb_n = '1, outa, outb;
  logic oa0, oa15, ora, ob0, ob15, orb, tpa, tpa_n, tpb, tpb_n, delin = 0, delout;
  logic [14:0] sena, senb;
  logic clk = 0, reset_n = 1, tdi = 0, tms = 1, tck = 0, tdo;
  logic [1:0] step = 0;
  int vcon;
  int checks = 0, failures = 0;

  pp_asic dut (
    .ina_p, .ina_n, .outa, .oa0, .oa15, .ora, .tpulsea(tpa), .tpulsea_n(tpa_n),
    .tpg_src_en_a(sena), .inb_p, .inb_n, .outb, .ob0, .ob15, .orb,
    .tpulseb(tpb), .tpulseb_n(tpb_n), .tpg_src_en_b(senb), .delin, .delout,
    .pol(1'b0), .bypass(1'b0), .clk, .tptrig(1'b0), .reset_n, .slenp(1'b1),
    .enb(1'b1), .env(1'b1), .enp(1'b0), .step, .vcon_ext_mv(0), .vcon_mv(vcon),
    .tdi, .tms, .tck, .tdo);

  always #12.5ns clk = ~clk;
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic tick(input logic m, input logic di);
    tms = m; tdi = di; #50ns tck = 1; #50ns tck = 0;
  endtask
  task automatic jwrite(input logic [7:0] code, input int n, input logic [15:0] v);
    tick(1, 0); tick(1, 0); tick(0, 0); tick(0, 0);
    for (int i = 0; i < 8; i++) tick(i == 7, code[i]);
    tick(1, 0); tick(0, 0);
    tick(1, 0); tick(0, 0); tick(0, 0);
    for (int i = 0; i < n; i++) tick(i == n - 1, v[i]);
    tick(1, 0); tick(0, 0);
  endtask

  initial begin
    int taps [6] = '{0, 1, 8, 16, 24, 31};
    for (int s = 0; s < 4; s++) begin
      int units; real d [6]; real res;
      units = 32 - 4 * s;
      step = 2'(s);
      reset_n = 0; #200ns reset_n = 1;
      tick(0, 0);
      #20us;
      foreach (taps[i]) begin
        realtime t0, t1;
        jwrite({OP_DEBUG_DEL, 1'b1}, 5, 16'(taps[i]));
        #100ns delin = ~delin; t0 = $realtime;
        @(posedge delout or negedge delout); t1 = $realtime;
        d[i] = (t1 - t0) / 1ps;
      end
      res = d[5] / 31.0;
      $display("%0d units: tap %.0f ps, range %.2f ns (taps 1/8/16/24: %.0f %.0f %.0f %.0f ps)",
               units, res, d[5] / 1000.0, d[1], d[2], d[3], d[4]);
      checks++;
      if (res < 0.98 * 25000.0 / units || res > 1.02 * 25000.0 / units) failures++;
      checks++;
      if (d[0] != 0.0) failures++;
      for (int i = 1; i < 5; i++) begin
        checks++;
        if (d[i] - taps[i] * res > 30.0 || taps[i] * res - d[i] > 30.0) failures++;
      end
      if (units <= 28) begin checks++; if (d[5] <= 25000.0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
