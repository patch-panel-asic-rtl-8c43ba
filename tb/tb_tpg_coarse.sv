// Checks trigger capture, coarse delay and pulse width of the test pulse
// timing.  Model: with the rising edge selected, the trigger is seen at the
// first rising clock edge k after it rises; with the falling edge selected,
// at the first falling edge, then re-timed to the following rising edge k.
// The pulse must rise at rising edge k + 1 + min(COARSE, 8) and last 120
// clocks.  A second trigger during a pulse must be ignored.
module tb_tpg_coarse;
  logic clk = 0, rst_n = 1, tptrig = 0, edge_rise = 1, pulse;
  logic [3:0] coarse = 0;
  int checks = 0, failures = 0;
  int edge_no = 0;                 // number of rising edges so far
  int rise_edge, fall_edge, n_fall_mode = 0, n_sat = 0;

  tpg_coarse dut (.clk, .rst_n, .tptrig, .edge_rise, .coarse, .pulse);

  initial forever begin #12.5ns clk = 1; edge_no++; #12.5ns clk = 0; end
  always @(posedge pulse) rise_edge = edge_no;
  always @(negedge pulse) fall_edge = edge_no;
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    #1ns rst_n = 0; #30ns rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int off_ps, k, d;
      coarse = 4'($urandom); if (n < 16) coarse = 4'(n);
      edge_rise = (n % 3) != 1;
      @(posedge clk); #1ns;                 // 1 ns after rising edge e
      off_ps = 1000 + $urandom % 22000;     // trigger within this clock period
      #(off_ps * 1ps);
      // rising edges: e at 12.5 ns + 25 ns * (edge_no - 1)
      if (edge_rise) k = edge_no + 1;
      else           k = (off_ps < 11500) ? edge_no + 1 : edge_no + 2;
      d = (coarse > 8) ? 8 : int'(coarse);
      if (!edge_rise) n_fall_mode++;
      if (coarse > 8) n_sat++;
      tptrig = 1; #60ns tptrig = 0;
      #200ns tptrig = 1; #30ns tptrig = 0;  // retrigger inside the pulse
      repeat (140) @(posedge clk);
      checks++;
      if (rise_edge != k + 1 + d || fall_edge - rise_edge != 120) begin
        failures++;
        $display("coarse=%0d rise=%0b off=%0d: rise %0d exp %0d width %0d",
                 coarse, edge_rise, off_ps, rise_edge, k + 1 + d, fall_edge - rise_edge);
      end
      checks++; if (pulse !== 1'b0) begin failures++; $display("retriggered"); end
    end
    checks++; if (n_fall_mode == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
