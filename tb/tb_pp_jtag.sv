// Checks the JTAG register block through its pins: default values after
// RESET_, write and read-back of every register in both modes, that a read
// instruction does not change a register, that undefined codes act as the
// 1-bit BYPASS register, and that an upset copy of a voted register is
// out-voted, raises the SEU flag and is cleared by re-writing.
module tb_pp_jtag;
  import pp_pkg::*;
  logic tck = 0, tms = 1, tdi = 0, tdo, rst_n = 1, seu;
  pp_cfg_t cfg;
  int checks = 0, failures = 0;

  pp_jtag dut (.tck, .tms, .tdi, .tdo, .rst_n, .cfg, .seu);
  initial begin #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic tick(input logic m, input logic di, output logic dout);
    tms = m; tdi = di; #50ns; dout = tdo; tck = 1; #50ns tck = 0;
  endtask
  task automatic shift_ir(input logic [7:0] code);
    logic x;
    tick(1, 0, x); tick(1, 0, x); tick(0, 0, x); tick(0, 0, x);
    for (int i = 0; i < 8; i++) tick(i == 7, code[i], x);
    tick(1, 0, x); tick(0, 0, x);
  endtask
  task automatic shift_dr(input int n, input logic [15:0] din, output logic [15:0] dout);
    logic x;
    dout = '0;
    tick(1, 0, x); tick(0, 0, x); tick(0, 0, x);
    for (int i = 0; i < n; i++) begin tick(i == n - 1, din[i], x); dout[i] = x; end
    tick(1, 0, x); tick(0, 0, x);
  endtask
  task automatic expect16(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  typedef struct { logic [6:0] op; int len; logic [15:0] dflt; } reg_t;
  reg_t regs [15];

  function automatic logic [15:0] field(input int i);
    case (i)
      0: return cfg.a.mask;          1: return cfg.b.mask;
      2: return 16'(cfg.a.tpg_amp);  3: return 16'(cfg.b.tpg_amp);
      4: return 16'(cfg.a.tpg_fine); 5: return 16'(cfg.b.tpg_fine);
      6: return 16'(cfg.a.tpg_coarse); 7: return 16'(cfg.b.tpg_coarse);
      8: return 16'(cfg.a.sig_del);  9: return 16'(cfg.b.sig_del);
      10: return 16'(cfg.a.bcid_del); 11: return 16'(cfg.b.bcid_del);
      12: return 16'(cfg.a.bcid_gate); 13: return 16'(cfg.b.bcid_gate);
      default: return 16'(cfg.debug_del);
    endcase
  endfunction

  initial begin
    logic [15:0] r, v [15];
    // register map as printed in the instruction table
    regs = '{'{7'b0000_010, 16, 16'hFFFF}, '{7'b0000_011, 16, 16'hFFFF},
             '{7'b0000_101, 4, 16'd15},    '{7'b0000_110, 4, 16'd15},
             '{7'b0001_000, 5, 16'd31},    '{7'b0001_001, 5, 16'd31},
             '{7'b0001_011, 5, 16'h1F},    '{7'b0001_100, 5, 16'h1F},
             '{7'b0001_110, 5, 16'd31},    '{7'b0001_111, 5, 16'd31},
             '{7'b0010_001, 5, 16'd31},    '{7'b0010_010, 5, 16'd31},
             '{7'b0010_100, 5, 16'd31},    '{7'b0010_101, 5, 16'd31},
             '{7'b0010_111, 5, 16'd31}};
    #10ns rst_n = 0; #100ns rst_n = 1;
    tick(0, 0, r[0]);                                  // to Run-Test/Idle
    // defaults, read mode
    for (int i = 0; i < 15; i++) begin
      shift_ir({regs[i].op, 1'b0});
      shift_dr(regs[i].len, 16'h0, r);
      expect16($sformatf("default %0d", i), r, regs[i].dflt);
      expect16($sformatf("field %0d", i), field(i), regs[i].dflt);
    end
    // write random values, then read them back
    for (int i = 0; i < 15; i++) begin
      v[i] = 16'($urandom) & ((17'h1 << regs[i].len) - 1);
      shift_ir({regs[i].op, 1'b1});
      shift_dr(regs[i].len, v[i], r);
      expect16($sformatf("old %0d", i), r, regs[i].dflt);  // capture of old value
      expect16($sformatf("wfield %0d", i), field(i), v[i]);
    end
    for (int i = 0; i < 15; i++) begin
      shift_ir({regs[i].op, 1'b0});
      shift_dr(regs[i].len, ~v[i], r);                    // read: not stored
      expect16($sformatf("read %0d", i), r, v[i]);
      expect16($sformatf("kept %0d", i), field(i), v[i]);
    end
    // undefined code: 1-bit bypass, data comes out one clock late
    shift_ir(8'h00);
    shift_dr(9, 16'b1_0110_1011, r);
    expect16("bypass", r, {7'b0, 8'b0110_1011, 1'b0});
    shift_ir(8'hA5);
    shift_dr(5, 16'b10011, r);
    expect16("bypass2", r, 16'b00110);
    // SEU flag
    shift_ir(8'b0011_0000); shift_dr(1, 0, r);
    expect16("seu clear", r, 0);
    force dut.u_sigdela.c1 = ~v[8][4:0];
    #1ns release dut.u_sigdela.c1;
    expect16("voted", field(8), v[8]);
    shift_ir(8'b0011_0000); shift_dr(1, 0, r);
    expect16("seu set", r, 1);
    checks++; if (seu !== 1'b1) failures++;
    shift_ir({regs[8].op, 1'b1}); shift_dr(5, v[8], r);
    shift_ir(8'b0011_0000); shift_dr(1, 0, r);
    expect16("seu after rewrite", r, 0);
    // RESET_ restores defaults
    rst_n = 0; #100ns rst_n = 1;
    for (int i = 0; i < 15; i++) expect16($sformatf("reset %0d", i), field(i), regs[i].dflt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
