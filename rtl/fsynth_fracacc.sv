// fsynth_fracacc -- error-correction accumulator and adder.
//
// The Register gives C2 as an integer part M and a fractional part R. Counter 2
// can only count whole cycles, so using M alone makes every output period too
// short by R and the output frequency too high. As in the accumulator of a
// fractional-N PLL, this block adds R into an FRAC_W-bit accumulator once per
// output period; when the sum overflows, the adder lengthens that one period by
// one count. Over 2**FRAC_W periods the overflow fires R times, so the mean
// period is exactly M + R/2**FRAC_W.
//
// Interface: `step` is high in the cycle in which Counter 2 reloads; in that
// cycle `preset` is the value it loads (period - 1, because Counter 2 counts
// down through zero) and the accumulator advances on the clk edge that ends the
// cycle. `carry` shows the overflow that lengthens the period being loaded.
// With `corr_en` low the accumulator is held at zero and every period is M:
// the uncorrected synthesizer. The accumulator contents are the sawtooth seen
// in the source's simulations. That the accumulator steps once per output
// period and that its carry adds one count is this design's reading of the
// block diagram.
module fsynth_fracacc #(
  parameter int unsigned C2_W   = 32,
  parameter int unsigned FRAC_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step,     // Counter 2 reloads in this cycle
  input  logic              corr_en,  // error correction on
  input  logic [C2_W-1:0]   m,        // integer part of C2 (>= 1)
  input  logic [FRAC_W-1:0] r,        // fractional part of C2
  output logic [C2_W-1:0]   preset,   // value for Counter 2: M + carry - 1
  output logic              carry,    // accumulator overflow for this period
  output logic [FRAC_W-1:0] acc       // accumulator contents
);

  logic [FRAC_W:0] sum;

  assign sum    = {1'b0, acc} + {1'b0, (corr_en ? r : '0)};
  assign carry  = sum[FRAC_W];
  assign preset = m + C2_W'(carry) - C2_W'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (!corr_en) begin
      acc <= '0;
    end else if (step) begin
      acc <= sum[FRAC_W-1:0];
    end
  end

endmodule
