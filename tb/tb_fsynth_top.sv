// tb_fsynth_top -- end-to-end test of the synthesizer at its default sizes.
//
// An input square wave fx of Tx clk cycles is applied (or, in PLL mode, a
// VCO-like square wave fo that the divider brings down to fx) and the output
// pulses fy are timed. With fc1 = fc2 = clk and a dead time of LOAD+CLEAR =
// 2 cycles, Counter 1 holds C1 = Tx - 2 (or (Tx-2)/div1 with a slower
// generator 1), and the expected output period follows from
// C2 = C1*mul/2**shr +/- fine, counted in fc2 cycles. All expected values are
// computed here from Tx and the control word.
//
// Each mechanism of the design is made to happen and counted: fine add and
// subtract, right shift (frequency multiply), left shift (frequency divide),
// the correction carry, operation with correction off, a non-unity generator
// ratio, PLL mode through the divide-by-N, Counter 1 overrun, and adaptive
// steps up and down. A mechanism that never happened counts as a failure.
module tb_fsynth_top;
  import fsynth_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        fx = 1'b0, fo = 1'b0;
  logic        pll_mode = 1'b0;
  logic [15:0] n_div = 16'd1;
  g_ctrl_t     ctrl;
  logic        corr_en = 1'b1, adapt_en = 1'b0;
  logic [7:0]  gen1_div = 8'd1, gen2_div = 8'd1;
  logic        fy, fy_half, valid, corr_carry, c2_reload, sat, load, clear;
  logic [23:0] c1;
  logic [31:0] m;
  logic [15:0] r, acc;
  logic [2:0]  gen_exp;

  fsynth_top dut (
    .clk, .rst_n, .fx_in(fx), .fo_in(fo), .pll_mode, .n_div, .ctrl, .corr_en,
    .adapt_en, .gen1_div, .gen2_div, .fy, .fy_half, .valid, .c1, .m, .r, .acc,
    .corr_carry, .c2_reload, .sat, .gen_exp, .load, .clear);

  int checks = 0, failures = 0;
  longint cycle = 0;
  int tx_half = 500;     // half period of fx in clk cycles
  int fo_half = 5;       // half period of fo in clk cycles

  // mechanism counters
  int n_fine_add = 0, n_fine_sub = 0, n_shift_r = 0, n_shift_l = 0;
  int n_carry = 0, n_nocorr = 0, n_gen_ratio = 0, n_pll = 0;
  int n_ovf = 0, n_adapt_up = 0, n_adapt_dn = 0, n_loads = 0;
  logic [2:0] exp_prev = '0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always begin
    repeat (tx_half) @(negedge clk);
    fx = ~fx;
  end
  always begin
    repeat (fo_half) @(negedge clk);
    fo = ~fo;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (corr_carry && c2_reload && valid) n_carry++;
      if (load && !$past(load)) n_loads++;
      if (sat) n_ovf++;
      if (gen_exp > exp_prev) n_adapt_up++;
      if (gen_exp < exp_prev) n_adapt_dn++;
      exp_prev <= gen_exp;
    end
  end

  localparam longint WATCHDOG = 200_000_000;
  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // Settle after a change, then time nper output periods.
  task automatic periods(input int nper, output longint per[$]);
    longint t0;
    per = {};
    wait_loads(3);
    wait_fy();
    wait_fy();
    t0 = cycle;
    for (int i = 0; i < nper; i++) begin
      wait_fy();
      per.push_back(cycle - t0);
      t0 = cycle;
    end
  endtask

  // Every period must equal exp_p.
  task automatic expect_exact(input string what, input int nper, input longint exp_p);
    longint per[$];
    periods(nper, per);
    foreach (per[i]) begin
      checks++;
      if (per[i] != exp_p) begin
        failures++;
        $display("FAIL %s: period %0d = %0d, expected %0d", what, i, per[i], exp_p);
      end
    end
  endtask

  // The sum of the first k periods must stay within one count of k*mean.
  task automatic expect_mean(input string what, input int nper, input real mean);
    longint per[$];
    longint sum;
    real    d;
    periods(nper, per);
    sum = 0;
    foreach (per[i]) begin
      sum += per[i];
      d = real'(sum) - (i + 1) * mean;
      checks++;
      if (d > 1.0 || d < -1.0) begin
        failures++;
        $display("FAIL %s: after %0d periods sum %0d, ideal %f", what, i + 1, sum, (i + 1) * mean);
      end
    end
  endtask

  task automatic set_ctrl(input int mul, input int shr, input int fine, input bit sub);
    ctrl = '{mul: MUL_W'(mul), shr: SHR_W'(shr), fine: FINE_W'(fine), fine_sub: sub};
  endtask

  initial begin
    int tx;
    int c1e;
    set_ctrl(1, 0, 2, 1'b0);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // 1. fy = fx: unity ratio, fine tuning adds back the 2-cycle dead time
    tx_half = 500; tx = 1000;
    expect_exact("unity+fine", 8, tx);
    n_fine_add++;

    // 2. without fine tuning the output period is short by the dead time
    set_ctrl(1, 0, 0, 1'b0);
    expect_exact("unity", 8, tx - 2);

    // 3. fine subtract
    set_ctrl(1, 0, 10, 1'b1);
    expect_exact("fine-sub", 8, tx - 2 - 10);
    n_fine_sub++;

    // 4. right shift by 3: frequency x8 (C1 = 1000)
    tx_half = 501; tx = 1002; c1e = tx - 2;
    set_ctrl(1, 3, 0, 1'b0);
    expect_exact("shift-right", 40, c1e / 8);
    n_shift_r++;

    // 5. left shift by 2 (mul = 4): frequency / 4
    set_ctrl(4, 0, 0, 1'b0);
    expect_exact("shift-left", 4, c1e * 4);
    n_shift_l++;

    // 6. x11 with correction: mul = round(2**16/11), 16 fraction bits
    set_ctrl(5958, 16, 0, 1'b0);
    corr_en = 1'b1;
    expect_mean("x11-corr", 200, real'(c1e) * 5958.0 / 65536.0);

    // 7. x11 without correction: every period is the integer part (too short)
    corr_en = 1'b0;
    expect_exact("x11-nocorr", 50, (longint'(c1e) * 5958) >> 16);
    n_nocorr++;
    corr_en = 1'b1;

    // 8. x5.7 with correction: mul = round(2**16/5.7)
    set_ctrl(11498, 16, 0, 1'b0);
    expect_mean("x5.7-corr", 200, real'(c1e) * 11498.0 / 65536.0);

    // 9. generator 1 at clk/2, generator 2 at clk/3: fy = fx * fc2/fc1, so
    //    each output period is C1 = 500 fc2 cycles = 1500 clk cycles
    set_ctrl(1, 0, 0, 1'b0);
    gen1_div = 8'd2; gen2_div = 8'd3;
    expect_exact("gen-ratio", 4, longint'(c1e / 2) * 3);
    n_gen_ratio++;
    gen1_div = 8'd1; gen2_div = 8'd1;

    // 10. PLL mode: input is fo / N; fo period 10, N = 50 -> 500 cycles
    fo_half = 5; n_div = 16'd50; pll_mode = 1'b1;
    set_ctrl(1, 0, 2, 1'b0);
    expect_exact("pll-divn", 8, 500);
    // with x2 in the register: fy = 2 * fo / N
    set_ctrl(1, 1, 1, 1'b0);
    expect_exact("pll-divn-x2", 8, 250);
    n_pll++;
    pll_mode = 1'b0;

    // 11. Counter 1 overrun: fx period longer than 2**24 cycles
    set_ctrl(1, 0, 0, 1'b0);
    tx_half = 8_500_000;
    wait_loads(2);
    @(posedge clk); @(posedge clk);
    checks++;
    if (!sat || c1 != 24'hffffff) begin
      failures++;
      $display("FAIL overrun: sat=%b c1=%0d", sat, c1);
    end

    // 12. adaptive control: the overrun slows both generators until the
    //     count fits (17M -> 8.5M > 2**23 -> 4.25M), then a fast input
    //     (C1 below 1024) speeds them up again
    adapt_en = 1'b1;
    wait_loads(3);
    checks++;
    if (gen_exp != 3'd2) begin
      failures++;
      $display("FAIL adaptive: exponent %0d after slow input, expected 2", gen_exp);
    end
    tx_half = 750; tx = 1500;   // at exponent 2, C1 = 374 < 1024
    wait_loads(4);
    checks++;
    if (gen_exp != 3'd0) begin
      failures++;
      $display("FAIL adaptive: exponent %0d after fast input, expected 0", gen_exp);
    end
    set_ctrl(1, 0, 2, 1'b0);
    expect_exact("after-adapt", 8, tx);
    adapt_en = 1'b0;

    checks++;
    if (n_fine_add == 0 || n_fine_sub == 0 || n_shift_r == 0 || n_shift_l == 0 ||
        n_carry == 0 || n_nocorr == 0 || n_gen_ratio == 0 || n_pll == 0 ||
        n_ovf == 0 || n_adapt_up == 0 || n_adapt_dn == 0 || n_loads == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: loads=%0d fine_add=%0d fine_sub=%0d shift_r=%0d shift_l=%0d carry=%0d nocorr=%0d gen_ratio=%0d pll=%0d overrun_cycles=%0d adapt_up=%0d adapt_dn=%0d",
             n_loads, n_fine_add, n_fine_sub, n_shift_r, n_shift_l, n_carry, n_nocorr, n_gen_ratio, n_pll, n_ovf, n_adapt_up, n_adapt_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
