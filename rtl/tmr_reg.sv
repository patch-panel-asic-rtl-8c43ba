// Triple-redundant configuration register with majority voting.
//
// Three copies of the register are written together; the output is the
// bit-wise majority of the three, so one upset copy does not change the
// value seen by the chip.  `mismatch` is high while any bit of the three
// copies disagrees; it feeds the chip's SEU flag.  The copies are not
// scrubbed: a disagreement stays until the register is written again.
// Timing: write on the rising clk edge when `we` is high; asynchronous
// reset to RESET_VAL.
module tmr_reg #(
  parameter int unsigned          WIDTH     = 8,
  parameter logic [WIDTH-1:0]     RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             mismatch
);
  logic [WIDTH-1:0] c0, c1, c2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c0 <= RESET_VAL; else if (we) c0 <= d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c1 <= RESET_VAL; else if (we) c1 <= d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c2 <= RESET_VAL; else if (we) c2 <= d;

  assign q        = (c0 & c1) | (c0 & c2) | (c1 & c2);
  assign mismatch = |((c0 ^ c1) | (c0 ^ c2));
endmodule
