// Checks the divide-by-two: after reset the output is low, then it toggles on
// every rising clock edge, giving a period of two input clocks.
module tb_clk_div2;
  logic clk = 0, rst_n = 1, q;
  int checks = 0, failures = 0;
  clk_div2 dut (.clk, .rst_n, .q);
  always #12.5ns clk = ~clk;
  initial begin #100us; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic exp;
    #1ns rst_n = 0; #29ns; checks++; if (q !== 1'b0) failures++;
    @(negedge clk) rst_n = 1;
    exp = 1'b0;
    repeat (40) begin
      @(posedge clk); #1ns; exp = ~exp;
      checks++; if (q !== exp) begin failures++; $display("q=%b exp=%b", q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
