// tb_fsynth_pll -- the synthesizer closing the feedback path of a loop.
//
// A behavioural oscillator, standing in for the VCO, drives fo_in; the
// synthesizer runs in PLL mode (input = fo / N) and its output fy is compared
// with a reference fi by a behavioural frequency detector: at every fy pulse
// the measured fy period is compared with the reference period, and an
// integrating loop filter moves the oscillator period by a fraction of the
// error. These three models are only a test harness; they are not part of
// the design. With N = 4 and the register set to C2 = 2.5 * C1 (mul = 5,
// shr = 1, fine = +5 to restore the 2-count dead time scaled by 2.5), the
// loop must settle at fo = 2.5 * N * fi = 10 * fi: a fractional multiple of
// the reference, which a plain divide-by-N loop cannot give.
module tb_fsynth_pll;
  import fsynth_pkg::*;

  localparam int  TREF = 2000;          // reference period, clk cycles
  localparam real FO_TARGET = 200.0;    // expected oscillator period

  logic clk = 1'b0, rst_n = 1'b0, fo = 1'b0;
  g_ctrl_t ctrl;
  logic fy, valid;
  int checks = 0, failures = 0;
  longint cycle = 0;

  // behavioural oscillator: period vco_p clk cycles, started off target
  real vco_p = 260.0;
  real next_edge = 0.0;

  fsynth_top dut (
    .clk, .rst_n, .fx_in(1'b0), .fo_in(fo), .pll_mode(1'b1), .n_div(16'd4), .ctrl,
    .corr_en(1'b1), .adapt_en(1'b0), .gen1_div(8'd1), .gen2_div(8'd1),
    .fy, .fy_half(), .valid, .c1(), .m(), .r(), .acc(), .corr_carry(), .c2_reload(),
    .sat(), .gen_exp(), .load(), .clear());

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) begin
    if (real'(cycle) >= next_edge) begin
      fo <= ~fo;
      next_edge = next_edge + vco_p / 2.0;
    end
  end

  // frequency detector and integrating loop filter acting on the oscillator
  longint last_fy = -1;
  int     n_fy = 0;
  real    err;
  always @(posedge clk) begin
    if (rst_n && valid && fy) begin
      if (last_fy >= 0) begin
        err   = real'(cycle - last_fy - TREF) / real'(TREF);
        vco_p = vco_p * (1.0 - 0.3 * err);
        n_fy++;
      end
      last_fy = cycle;
    end
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    real fy_mean;
    int f0;
    ctrl = '{mul: 16'd5, shr: 5'd1, fine: FINE_W'(5), fine_sub: 1'b0};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // let the loop settle
    wait (n_fy >= 150);
    $display("oscillator period after settling: %f clk cycles (target %f)", vco_p, FO_TARGET);
    checks++;
    if (vco_p < FO_TARGET * 0.99 || vco_p > FO_TARGET * 1.01) begin
      failures++;
      $display("FAIL oscillator period %f, expected %f", vco_p, FO_TARGET);
    end
    // measured: fy must match the reference on average
    f0 = n_fy; t0 = last_fy;
    wait (n_fy >= f0 + 40);
    fy_mean = real'(last_fy - t0) / 40.0;
    $display("mean fy period %f (reference %0d)", fy_mean, TREF);
    checks++;
    if (fy_mean < TREF - 2.0 || fy_mean > TREF + 2.0) begin
      failures++;
      $display("FAIL fy period %f, reference %0d", fy_mean, TREF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
