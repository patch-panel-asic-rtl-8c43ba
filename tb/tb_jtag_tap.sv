// Walks the TAP controller through the IR and DR scan paths, checks each
// strobe output against the state the TMS sequence should reach, and checks
// that five TCK cycles with TMS high return it to Test-Logic-Reset from any
// state.
module tb_jtag_tap;
  logic tck = 0, tms = 1, rst_n = 1;
  logic tlr, cdr, sdr, udr, cir, sir, uir;
  int checks = 0, failures = 0;
  jtag_tap dut (.tck, .tms, .rst_n, .tlr, .capture_dr(cdr), .shift_dr(sdr),
                .update_dr(udr), .capture_ir(cir), .shift_ir(sir), .update_ir(uir));
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // expected strobes as {tlr,cdr,sdr,udr,cir,sir,uir}
  task automatic step(input logic t, input logic [6:0] e);
    tms = t; #50ns tck = 1; #50ns tck = 0;
    checks++;
    if ({tlr,cdr,sdr,udr,cir,sir,uir} !== e) begin
      failures++; $display("tms=%b got %b exp %b", t, {tlr,cdr,sdr,udr,cir,sir,uir}, e);
    end
  endtask

  localparam logic [6:0] NONE = 7'b0, TLR = 7'b1000000, CDR = 7'b0100000,
    SDR = 7'b0010000, UDR = 7'b0001000, CIR = 7'b0000100, SIR = 7'b0000010,
    UIR = 7'b0000001;

  initial begin
    #5ns rst_n = 0; #15ns; checks++; if (!tlr) failures++;
    rst_n = 1;
    step(1, TLR); step(0, NONE);                   // RTI
    step(1, NONE); step(1, NONE); step(0, CIR);     // Sel-DR, Sel-IR, Cap-IR
    step(0, SIR); step(0, SIR); step(1, NONE);      // shift, shift, Exit1
    step(0, NONE); step(1, NONE); step(0, SIR);     // Pause, Exit2, Shift
    step(1, NONE); step(1, UIR); step(0, NONE);     // Exit1, Update, RTI
    step(1, NONE); step(0, CDR); step(0, SDR);      // Sel-DR, Cap-DR, Shift
    step(1, NONE); step(1, UDR);                    // Exit1, Update
    step(1, NONE); step(0, CDR); step(1, NONE);     // Sel-DR, Cap-DR, Exit1
    step(0, NONE); step(1, NONE); step(0, SDR);     // Pause, Exit2, Shift
    step(1, NONE); step(1, UDR);                    // Exit1, Update
    step(0, NONE);
    // random walks, then five TMS=1 must reach TLR
    for (int r = 0; r < 30; r++) begin
      for (int i = 0; i < ($urandom % 12); i++) begin
        tms = 1'($urandom); #50ns tck = 1; #50ns tck = 0;
      end
      for (int i = 0; i < 5; i++) begin tms = 1; #50ns tck = 1; #50ns tck = 0; end
      checks++; if (!tlr) begin failures++; $display("not in TLR"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
