// Effective BCID gate width sweep on one port, as in the scatter-plot
// measurement of hit time against output crossing.  For each gate setting a
// single channel is hit at times stepped by 250 ps across two clock periods;
// for each hit the crossings reported on OUT are recorded.  The span of hit
// times that produce a report in one given crossing is the effective gate,
// which must be 25 ns + BCID_GATE x unit delay within one time step.  With
// the unit delay at 781 ps the settings 1..31 span about 26 to 49 ns.
module tb_gate_width;
  import pp_pkg::*;
  localparam int U_PS = 781;
  logic clk = 0, rst_n = 1, pol = 0, bypass = 0, o0, o15, hor;
  logic [NCH-1:0] rx = '0, out;
  logic [4:0] bcid_gate = 0;
  int vcon = 2894;
  int checks = 0, failures = 0;
  int edge_no = 0;
  int hits [$];                          // clock edges where OUT[0] was high

  pp_port dut (.clk, .rst_n, .pol, .bypass, .vcon_mv(vcon), .rx, .mask('1),
               .sig_del(5'd0), .bcid_del(5'd0), .bcid_gate, .out, .o0, .o15, .hit_or(hor));

  initial forever begin #12.5ns clk = 1; edge_no++; #12.5ns clk = 0; end
  always @(posedge clk) begin
    automatic int k = edge_no;
    #5ns if (out[0]) hits.push_back(k);
  end
  initial begin #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int gates [6] = '{0, 1, 8, 16, 24, 31};
    #1ns rst_n = 0; #20ns rst_n = 1;
    foreach (gates[gi]) begin
      int first_ps, last_ps, target;
      bcid_gate = 5'(gates[gi]);
      first_ps = -1; last_ps = -1;
      repeat (4) @(posedge clk);
      // hit at offset o after clock edge e0; report in crossing "e0 + 2"?
      for (int o = 100; o < 50000; o += 250) begin
        int e0;
        @(posedge clk); #1ps; e0 = edge_no;
        hits.delete();
        #(o * 1ps - 1ps);
        rx[0] = 1; #3ns rx[0] = 0;
        repeat (6) @(posedge clk); #10ns;
        // target crossing: output after clock edge e0 + 2
        foreach (hits[h]) if (hits[h] == e0 + 2) begin
          if (first_ps < 0) first_ps = o;
          last_ps = o;
        end
      end
      checks++;
      begin
        int w, exp_w;
        w = last_ps - first_ps + 250;
        exp_w = 25000 + gates[gi] * U_PS;
        $display("gate %0d: effective width %0d ps (expected %0d)", gates[gi], w, exp_w);
        if (w - exp_w > 250 || exp_w - w > 250) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
