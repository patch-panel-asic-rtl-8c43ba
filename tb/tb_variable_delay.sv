// Checks the delay line model: each edge of the input reaches the output
// SEL x unit delay later, the unit delay being 375 ps + 1 ps per mV below
// 3.3 V, for random taps and control voltages, including SEL = 0, and that
// a pulse shorter than the delay comes out whole.
module tb_variable_delay;
  logic in = 0, out;
  logic [4:0] sel;
  int vcon;
  int checks = 0, failures = 0;
  realtime t_in, t_out;
  variable_delay dut (.in, .sel, .vcon_mv(vcon), .out);
  always @(posedge out or negedge out) t_out = $realtime;
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 60; i++) begin
      realtime exp;
      sel = 5'($urandom); if (i < 2) sel = 5'(i * 31);
      vcon = 1500 + $urandom % 1801;
      #200ns;
      exp = sel * (375 + (3300 - vcon)) * 1ps;
      in = ~in; t_in = $realtime;
      #150ns;
      checks++;
      if (out !== in || (t_out - t_in) - exp > 1ps || exp - (t_out - t_in) > 1ps) begin
        failures++; $display("sel=%0d vcon=%0d delay=%0t exp=%0t", sel, vcon, t_out - t_in, exp);
      end
    end
    // a pulse shorter than the delay: both edges are in flight at once
    sel = 5'd31; vcon = 2894; in = 1'b0; #100ns;
    in = 1'b1; t_in = $realtime; #4ns in = 1'b0;
    @(posedge out); checks++;
    if ($realtime - t_in - 31 * 781 * 1ps > 1ps || 31 * 781 * 1ps - ($realtime - t_in) > 1ps) failures++;
    @(negedge out); checks++;
    if ($realtime - t_in - 31 * 781 * 1ps - 4ns > 1ps || 31 * 781 * 1ps + 4ns - ($realtime - t_in) > 1ps) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
