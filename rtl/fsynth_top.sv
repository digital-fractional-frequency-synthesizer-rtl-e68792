// fsynth_top -- counter-based digital fractional frequency synthesizer.
//
// The synthesizer produces fy = fx * k from an input frequency fx with no
// oscillator loop: Counter 1 measures the period of fx in cycles of generator
// 1 (C1 = fc1/fx), the Register turns the count into C2 = g(C1), and Counter 2
// counts C2 cycles of generator 2 per output pulse (fy = fc2/C2). With
// g(C1) = C1/k1 this gives fy = fc2 * k1 * fx / fc1. The fractional part of C2
// that Counter 2 cannot count is kept by an accumulator whose overflow adds
// one count to a period now and then, so the mean output frequency is right.
// An adaptive control scales both generators by the same power of two to keep
// the counts large but within range.
//
// Data flow (one clk domain, the master oscillator):
//   fx_in / fo_in->divide-by-N  -> LOAD/CLEAR sequencer -> Counter 1 (fc1)
//   -> Register + control g -> accumulator/adder -> Counter 2 (fc2) -> fy
//   generators 1 and 2 <- adaptive control <- Register
//
// With pll_mode high the synthesizer input is fo_in divided by n_div, the
// feedback path of a PLL in which this block replaces the plain divider; fy is
// then the signal for the external phase detector and the VCO gives
// fo = fc1 * N * fi / (fc2 * k1). The phase detector, loop filter and VCO are
// outside this design.
//
// Interface: all inputs except fx_in and fo_in are synchronous to clk; fx_in
// and fo_in are sampled. fy is a one-clk-cycle pulse per output period; fy_half
// is the square wave at fy/2. Latency from an fx edge to the new M is five clk
// cycles (three to see the edge, one to capture, one to apply g); Counter 2
// takes the new value at its next reload, so output periods are never cut.
// The structure follows the source; clocking by enables, the general
// multiplier in g, the pulse lengths and the adaptive thresholds are this
// design's choices (see the submodules).
module fsynth_top
  import fsynth_pkg::*;
#(
  parameter int unsigned C1_W      = 24,  // Counter 1 length
  parameter int unsigned C2_W      = 32,  // Counter 2 length
  parameter int unsigned SLICE_W   = 8,   // Counter 2 slice width
  parameter int unsigned FRAC_W    = 16,  // fractional part / accumulator width
  parameter int unsigned LOAD_CYC  = 1,   // LOAD pulse, clk cycles
  parameter int unsigned CLEAR_CYC = 1,   // CLEAR pulse, clk cycles
  parameter int unsigned DIV_W     = 8,   // generator base divider width
  parameter int unsigned EXP_W     = 3,   // generator exponent width
  parameter int unsigned LOW_TH    = 1024,
  parameter int unsigned HIGH_TH   = 1 << (C1_W - 1),
  parameter int unsigned N_W       = 16   // PLL divide number width
) (
  input  logic              clk,          // master oscillator
  input  logic              rst_n,
  // input frequency and PLL feedback
  input  logic              fx_in,        // input frequency fx (asynchronous)
  input  logic              fo_in,        // VCO output fo (asynchronous)
  input  logic              pll_mode,     // 1: input is fo_in / n_div
  input  logic [N_W-1:0]    n_div,        // PLL divide number N
  // control
  input  g_ctrl_t           ctrl,         // control function g
  input  logic              corr_en,      // fractional error correction on
  input  logic              adapt_en,     // adaptive generator control on
  input  logic [DIV_W-1:0]  gen1_div,     // generator 1: fc1 = f_clk/(div*2**exp)
  input  logic [DIV_W-1:0]  gen2_div,     // generator 2: fc2 = f_clk/(div*2**exp)
  // output
  output logic              fy,           // output pulse (Counter 2 carry out)
  output logic              fy_half,      // square wave at fy/2
  // status
  output logic              valid,        // output derived from a full period
  output logic [C1_W-1:0]   c1,           // last measured C1
  output logic [C2_W-1:0]   m,            // integer part of C2
  output logic [FRAC_W-1:0] r,            // fractional part of C2
  output logic [FRAC_W-1:0] acc,          // correction accumulator
  output logic              corr_carry,   // accumulator overflow (long period)
  output logic              c2_reload,    // Counter 2 loads this cycle
  output logic              sat,          // C1 overran or C2 was clamped
  output logic [EXP_W-1:0]  gen_exp,      // generator exponent from adaptive control
  output logic              load,         // LOAD pulse
  output logic              clear         // CLEAR pulse
);

  logic              syn_in;
  logic              divn_q;
  logic              ce1, ce2;
  logic              load_stb, c1_enable;
  logic [C1_W-1:0]   c1_count;
  logic              c1_ovf;
  logic [C2_W-1:0]   c2_preset;

  // PLL feedback divider and input selection
  fsynth_divn #(.N_W(N_W)) u_divn (
    .clk, .rst_n, .fo_async(fo_in), .n(n_div), .q(divn_q)
  );
  assign syn_in = pll_mode ? divn_q : fx_in;

  // Generators 1 and 2
  fsynth_gen #(.DIV_W(DIV_W), .EXP_W(EXP_W)) u_gen1 (
    .clk, .rst_n, .div(gen1_div), .exp(gen_exp), .ce(ce1)
  );
  fsynth_gen #(.DIV_W(DIV_W), .EXP_W(EXP_W)) u_gen2 (
    .clk, .rst_n, .div(gen2_div), .exp(gen_exp), .ce(ce2)
  );

  // LOAD / CLEAR from the edges of the input
  fsynth_loadclr #(.LOAD_CYC(LOAD_CYC), .CLEAR_CYC(CLEAR_CYC)) u_loadclr (
    .clk, .rst_n, .fx_async(syn_in), .load, .load_stb, .clear,
    .enable(c1_enable), .edge_seen()
  );

  // Counter 1 (up)
  fsynth_counter1 #(.W(C1_W)) u_counter1 (
    .clk, .rst_n, .ce(ce1), .enable(c1_enable), .clr(clear),
    .count(c1_count), .ovf(c1_ovf)
  );

  // Register with control g
  fsynth_register #(.C1_W(C1_W), .C2_W(C2_W), .FRAC_W(FRAC_W)) u_register (
    .clk, .rst_n, .load_stb, .c1_in(c1_count), .c1_ovf, .ctrl,
    .c1, .m, .r, .valid, .sat
  );

  // Adaptive control of both generators
  fsynth_adapt #(.C1_W(C1_W), .EXP_W(EXP_W), .LOW_TH(LOW_TH), .HIGH_TH(HIGH_TH)) u_adapt (
    .clk, .rst_n, .en(adapt_en), .upd(load_stb), .c1_in(c1_count), .ovf(c1_ovf),
    .exp(gen_exp), .step_up(), .step_dn()
  );

  // Accumulator and adder for the fractional error correction
  fsynth_fracacc #(.C2_W(C2_W), .FRAC_W(FRAC_W)) u_fracacc (
    .clk, .rst_n, .step(c2_reload && valid), .corr_en, .m, .r,
    .preset(c2_preset), .carry(corr_carry), .acc
  );

  // Counter 2 (down)
  fsynth_counter2 #(.W(C2_W), .SLICE_W(SLICE_W)) u_counter2 (
    .clk, .rst_n, .ce(ce2), .run(valid), .preset(c2_preset),
    .count(), .reload(c2_reload), .fy, .fy_half
  );

endmodule
