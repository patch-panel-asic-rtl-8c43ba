// Checks the triple-redundant register: reset value, writes, hold without
// write enable, out-voting of one upset copy with the mismatch flag raised,
// and recovery when the register is written again.
module tb_tmr_reg;
  logic clk = 0, rst_n = 1, we = 0, mm;
  logic [7:0] d = 0, q;
  int checks = 0, failures = 0;
  tmr_reg #(.WIDTH(8), .RESET_VAL(8'hA5)) dut (.clk, .rst_n, .we, .d, .q, .mismatch(mm));
  always #5ns clk = ~clk;
  initial begin #100us; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input logic [7:0] eq, input logic emm);
    checks++;
    if (q !== eq || mm !== emm) begin
      failures++; $display("q=%h exp %h mm=%b exp %b", q, eq, mm, emm);
    end
  endtask
  initial begin
    logic [7:0] v;
    #1ns rst_n = 0; #11ns; check(8'hA5, 0);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      v = 8'($urandom);
      @(negedge clk) begin we = 1; d = v; end
      @(negedge clk) we = 0; d = ~v;
      check(v, 0);
      @(negedge clk) check(v, 0);     // no write: held
      // upset one copy
      force dut.c1 = ~v;
      #1ns release dut.c1;
      @(negedge clk) check(v, 1);
      force dut.c2 = v ^ 8'h0F;
      #1ns release dut.c2;
      // copies now v, ~v, v^0F: the low nibble is out-voted
      check(v ^ 8'h0F, 1'b1);
      @(negedge clk) begin we = 1; d = v; end
      @(negedge clk) we = 0;
      check(v, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
