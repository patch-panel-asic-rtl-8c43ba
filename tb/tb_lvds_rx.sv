// Checks the receiver model: the output follows the differential input
// after the receiver delay and is low with no differential signal.
module tb_lvds_rx;
  logic p = 0, n = 1, out;
  int checks = 0, failures = 0;
  lvds_rx dut (.in_p(p), .in_n(n), .out);
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #10ns;
    for (int i = 0; i < 40; i++) begin
      logic b, prev; b = 1'($urandom); prev = out;
      p = b; n = ~b;
      #1.9ns; checks++; if (out !== prev) begin failures++; $display("early change"); end
      #0.2ns; checks++; if (out !== b) begin failures++; $display("out=%b exp %b", out, b); end
      #10ns;
    end
    p = 1; n = 1; #3ns; checks++; if (out !== 0) failures++;
    p = 1; n = 0; #1ns; checks++; if (out !== 0) failures++;   // not yet through
    #1.5ns; checks++; if (out !== 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
