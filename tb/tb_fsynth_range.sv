// tb_fsynth_range -- input frequency range of the default (24/32-bit) design.
//
// With a 33.3 MHz master clock the 24-bit Counter 1 must measure inputs from
// 2 Hz (16.65 million counts, just below 2**24) up to 6.2 MHz (about 5.4
// counts per period). fx is generated with fractional-cycle accuracy. At
// 2 Hz the output period must equal the input period once the 2-cycle dead
// time is added back by fine tuning, and no overrun may occur; at 6.2 MHz the
// mean output period over many periods must be within one clk cycle of the
// input period. The design runs with all parameters at their defaults.
module tb_fsynth_range;
  import fsynth_pkg::*;

  localparam real FC = 33.3e6;

  logic clk = 1'b0, rst_n = 1'b0, fx = 1'b0;
  g_ctrl_t ctrl;
  logic fy, load, sat;
  logic [23:0] c1;
  int checks = 0, failures = 0;
  longint cycle = 0;
  real half = 1000.0, next_edge = 0.0;

  fsynth_top dut (
    .clk, .rst_n, .fx_in(fx), .fo_in(1'b0), .pll_mode(1'b0), .n_div(16'd1), .ctrl,
    .corr_en(1'b1), .adapt_en(1'b0), .gen1_div(8'd1), .gen2_div(8'd1),
    .fy, .fy_half(), .valid(), .c1, .m(), .r(), .acc(), .corr_carry(), .c2_reload(),
    .sat, .gen_exp(), .load, .clear());

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) begin
    if (real'(cycle) >= next_edge) begin
      fx <= ~fx;
      next_edge = next_edge + half;
    end
  end

  initial begin : watchdog
    repeat (120_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_fx(input real f);
    half = FC / f / 2.0;
    next_edge = real'(cycle) + half;
  endtask

  task automatic wait_loads(input int n);
    repeat (n) begin
      @(posedge clk);
      while (!load) @(posedge clk);
      while (load) @(posedge clk);
    end
  endtask

  task automatic wait_fy();
    @(posedge clk);
    while (!fy) @(posedge clk);
  endtask

  initial begin
    longint t0;
    real tx, mp;
    ctrl = '{mul: 16'd1, shr: '0, fine: FINE_W'(2), fine_sub: 1'b0};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // top of the range first (short periods)
    set_fx(6.2e6);
    tx = FC / 6.2e6;
    wait_loads(3);
    wait_fy();
    t0 = cycle;
    repeat (500) wait_fy();
    mp = real'(cycle - t0) / 500.0;
    $display("6.2 MHz: input period %f, mean output period %f cycles", tx, mp);
    checks++;
    if (mp < tx - 1.0 || mp > tx + 1.0) begin
      failures++;
      $display("FAIL at 6.2 MHz");
    end

    // bottom of the range: 2 Hz
    set_fx(2.0);
    tx = FC / 2.0;
    wait_loads(2);
    @(posedge clk); @(posedge clk);
    $display("2 Hz: C1 = %0d of %0d", c1, 24'hffffff);
    checks++;
    if (sat || real'(c1) < tx - 3.0 || real'(c1) > tx) begin
      failures++;
      $display("FAIL at 2 Hz: sat=%b c1=%0d, input period %f", sat, c1, tx);
    end
    wait_fy();
    t0 = cycle;
    wait_fy();
    mp = real'(cycle - t0);
    $display("2 Hz: output period %f cycles, input period %f", mp, tx);
    checks++;
    if (mp < tx - 1.0 || mp > tx + 1.0) begin
      failures++;
      $display("FAIL 2 Hz output period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
