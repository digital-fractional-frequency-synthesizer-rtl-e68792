// fsynth_adapt -- adaptive control of the two generators.
//
// The accuracy of the synthesizer depends on how large the counted numbers
// are. The adaptive control reads the register once per measurement (on the
// capture strobe): when the measured count C1 is below LOW_TH, it multiplies
// the frequencies of both generators by two (lowers the shared divide
// exponent); when C1 is above HIGH_TH, or Counter 1 overran, it divides both
// by two (raises the exponent). Both generators take the same exponent, so
// fc1/fc2 and therefore the synthesized ratio are unchanged; only the
// resolution moves. One step is taken per measurement, so the control settles
// in a few periods of fx. HIGH_TH must exceed 2*LOW_TH to avoid hunting.
//
// The source gives the behaviour (multiply both when the number is too small,
// divide both when it is too big) but not the thresholds, the step size or
// which number is read; the powers of two, the thresholds and the use of C1
// are this design's choices. The change is made on the strobe, when Counter 1
// is about to be cleared, so the next measurement is taken entirely at the new
// rate; for that one period Counter 2 still counts the previous number at the
// new rate, so one output period is off by a factor of two.
//
// Timing: `exp` changes on the clk edge that ends the upd cycle.
module fsynth_adapt #(
  parameter int unsigned C1_W    = 24,
  parameter int unsigned EXP_W   = 3,
  parameter int unsigned LOW_TH  = 1024,             // too small below this
  parameter int unsigned HIGH_TH = 1 << (C1_W - 1)   // too big above this
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,      // adaptive control enabled
  input  logic             upd,     // capture strobe: a new C1 is available
  input  logic [C1_W-1:0]  c1_in,   // count being captured
  input  logic             ovf,     // Counter 1 overran
  output logic [EXP_W-1:0] exp,     // shared generator exponent
  output logic             step_up, // exponent raised (generators slowed)
  output logic             step_dn  // exponent lowered (generators sped up)
);

  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  always_comb begin
    step_up = en && upd && (ovf || (c1_in > C1_W'(HIGH_TH))) && (exp != EXP_MAX);
    step_dn = en && upd && !ovf && (c1_in < C1_W'(LOW_TH)) && (exp != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp <= '0;
    end else if (step_up) begin
      exp <= exp + EXP_W'(1);
    end else if (step_dn) begin
      exp <= exp - EXP_W'(1);
    end
  end

  initial assert (HIGH_TH > 2 * LOW_TH) else $error("HIGH_TH must exceed 2*LOW_TH");

endmodule
