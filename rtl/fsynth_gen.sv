// fsynth_gen -- counting-clock generator (Generator 1 / Generator 2).
//
// The two counters of the synthesizer count a generator frequency: Counter 1
// counts fc1 and Counter 2 counts fc2. Here both generators are derived from
// the single master oscillator clock `clk` as clock-enable pulse trains: `ce`
// is high for one clk cycle every max(div,1) * 2**exp cycles, so
// fc = f_clk / (max(div,1) * 2**exp). With div = 1 and exp = 0, ce is always
// high and fc equals the master clock, as in the experiments where Clk1 and
// Clk2 are tied to the same crystal.
//
// The exponent input is driven by the adaptive control, which multiplies or
// divides both generator frequencies by the same power of two so that fc1/fc2
// stays constant. A new divide value takes effect at the next ce pulse.
// That generators are clock enables of one master clock, and that they are
// scaled in powers of two, is this design's choice: the source names the
// generators and the fact that they are multiplied or divided, nothing more.
module fsynth_gen #(
  parameter int unsigned DIV_W = 8,  // width of the base divide value
  parameter int unsigned EXP_W = 3   // width of the power-of-two exponent
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div,   // base divide ratio (0 is read as 1)
  input  logic [EXP_W-1:0] exp,   // extra divide by 2**exp
  output logic             ce     // one-cycle enable at rate fc
);

  localparam int unsigned CNT_W = DIV_W + (1 << EXP_W);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] period;

  always_comb begin
    period = CNT_W'((div == '0) ? DIV_W'(1) : div) << exp;
  end

  assign ce = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (cnt == '0) begin
      cnt <= period - CNT_W'(1);
    end else begin
      cnt <= cnt - CNT_W'(1);
    end
  end

endmodule
