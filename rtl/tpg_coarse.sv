// Trigger capture, coarse delay and pulse timing of the test pulse generator.
//
// TPTRIG is sampled on the rising clock edge (EDGE_RISE = 1) or on the
// falling edge (EDGE_RISE = 0, TPG_COARSE[4]); the falling-edge sample is
// then re-timed to the next rising edge.  A low-to-high change of the
// sampled trigger starts a test pulse after COARSE clocks, COARSE being
// TPG_COARSE[3:0] limited to MAX_COARSE (8 clocks, 200 ns).  The pulse lasts
// PULSE_CLKS clocks (120 clocks = 3 us at 40 MHz) and goes on to the fine
// delay and the output stage.  A trigger arriving while a pulse is being
// delayed or output is ignored.
// Timing: with the rising edge selected, a trigger sampled high at clock
// edge k (and low at k-1) raises PULSE just after edge k + 1 + COARSE.
// The edge selection, the 0-8 clock range and the 3 us width follow the
// chip; the counter structure, the limit for codes above 8 and the
// treatment of triggers during a pulse are this design's choices.
module tpg_coarse #(
  parameter int unsigned PULSE_CLKS = 120,
  parameter int unsigned MAX_COARSE = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tptrig,     // TPTRIG
  input  logic       edge_rise,  // TPG_COARSE[4]
  input  logic [3:0] coarse,     // TPG_COARSE[3:0]
  output logic       pulse
);
  localparam int unsigned CW = $clog2(PULSE_CLKS + MAX_COARSE + 1);

  logic          trig_r, trig_f, trig_f_r, samp, samp_d, start, busy;
  logic [CW-1:0] cnt;
  logic [3:0]    dly;

  assign dly = (coarse > 4'(MAX_COARSE)) ? 4'(MAX_COARSE) : coarse;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_r <= 1'b0; else trig_r <= tptrig;
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) trig_f <= 1'b0; else trig_f <= tptrig;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_f_r <= 1'b0; else trig_f_r <= trig_f;

  assign samp  = edge_rise ? trig_r : trig_f_r;
  assign start = samp & ~samp_d;

  // cnt counts down the coarse delay, then the pulse width.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      samp_d <= 1'b0; busy <= 1'b0; pulse <= 1'b0; cnt <= '0;
    end else begin
      samp_d <= samp;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          if (dly == 0) begin
            pulse <= 1'b1;
            cnt   <= CW'(PULSE_CLKS - 1);
          end else begin
            cnt   <= CW'(dly - 1) + CW'(PULSE_CLKS);
          end
        end
      end else begin
        if (cnt == CW'(PULSE_CLKS)) pulse <= 1'b1;
        if (cnt == 0) begin
          busy  <= 1'b0;
          pulse <= 1'b0;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
endmodule
