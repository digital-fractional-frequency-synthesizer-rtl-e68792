// tb_fsynth_board -- the measurements of the 16-bit board version.
//
// Two 16-bit synthesizers (Counter 1 and Counter 2 of 16 bits, unity ratio,
// fc1 = fc2 = clk = 31.111 MHz) are driven with the same input fx. One has a
// LOAD+CLEAR dead time of 19 cycles (0.6 us at 31.111 MHz), the other of 2
// cycles (60 ns). fx is generated with fractional-cycle accuracy from its
// frequency in Hz.
//
// Long dead time (the table of fx from 1502 Hz to 100 kHz): the output period
// must be the input period less the dead time, i.e. the difference
// C1 - C2 = fc/fx - fc/fy is constant (19 counts here), for every fx. With the
// fine-tuning adder set to +19 the output period must equal the input period.
// Short dead time (fx from 2 kHz to 3.275 MHz, fine tuning +2): the mean
// output period must match the input period to within one clk cycle.
// Also checked: the lowest fx that a 16-bit Counter 1 measures without
// overrun at 31.111 MHz is about 476 Hz (470 Hz overruns, 480 Hz does not).
module tb_fsynth_board;
  import fsynth_pkg::*;

  localparam real FC = 31.111e6;
  localparam int  DEAD_LONG = 19, DEAD_SHORT = 2;

  logic clk = 1'b0, rst_n = 1'b0, fx = 1'b0;
  g_ctrl_t ctrl_l, ctrl_s;
  logic [1:0] fy, load, sat;
  logic [15:0] c1_l, c1_s;
  int checks = 0, failures = 0;
  longint cycle = 0;
  real half = 10000.0, next_edge = 0.0;

  fsynth_top #(.C1_W(16), .C2_W(16), .LOAD_CYC(9), .CLEAR_CYC(10), .HIGH_TH(1 << 15)) u_long (
    .clk, .rst_n, .fx_in(fx), .fo_in(1'b0), .pll_mode(1'b0), .n_div(16'd1), .ctrl(ctrl_l),
    .corr_en(1'b1), .adapt_en(1'b0), .gen1_div(8'd1), .gen2_div(8'd1),
    .fy(fy[0]), .fy_half(), .valid(), .c1(c1_l), .m(), .r(), .acc(), .corr_carry(),
    .c2_reload(), .sat(sat[0]), .gen_exp(), .load(load[0]), .clear());

  fsynth_top #(.C1_W(16), .C2_W(16), .LOAD_CYC(1), .CLEAR_CYC(1), .HIGH_TH(1 << 15)) u_short (
    .clk, .rst_n, .fx_in(fx), .fo_in(1'b0), .pll_mode(1'b0), .n_div(16'd1), .ctrl(ctrl_s),
    .corr_en(1'b1), .adapt_en(1'b0), .gen1_div(8'd1), .gen2_div(8'd1),
    .fy(fy[1]), .fy_half(), .valid(), .c1(c1_s), .m(), .r(), .acc(), .corr_carry(),
    .c2_reload(), .sat(sat[1]), .gen_exp(), .load(load[1]), .clear());

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  // fx edges at the nearest clk edge to the ideal time
  always @(negedge clk) begin
    if (real'(cycle) >= next_edge) begin
      fx <= ~fx;
      next_edge = next_edge + half;
    end
  end

  initial begin : watchdog
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_fx(input real f);
    half = FC / f / 2.0;
    next_edge = real'(cycle) + half;
  endtask

  task automatic wait_loads(input int k, input int n);
    repeat (n) begin
      @(posedge clk);
      while (!load[k]) @(posedge clk);
      while (load[k]) @(posedge clk);
    end
  endtask

  task automatic wait_fy(input int k);
    @(posedge clk);
    while (!fy[k]) @(posedge clk);
  endtask

  // mean output period of synthesizer k over n periods, after settling
  task automatic mean_period(input int k, input int n, output real mean);
    longint t0;
    wait_loads(k, 3);
    wait_fy(k);
    wait_fy(k);
    t0 = cycle;
    repeat (n) wait_fy(k);
    mean = real'(cycle - t0) / n;
  endtask

  real tab1 [8] = '{1502.0, 2010.0, 4008.0, 6004.0, 10008.0, 20004.0, 40000.0, 100000.0};
  real tab2 [9] = '{2.0e3, 6.0e3, 10.0e3, 100.0e3, 400.0e3, 800.0e3, 1082.1e3, 2020.0e3, 3275.0e3};

  initial begin
    real tx, mp, diff;
    ctrl_l = '{mul: 16'd1, shr: '0, fine: '0, fine_sub: 1'b0};
    ctrl_s = '{mul: 16'd1, shr: '0, fine: FINE_W'(DEAD_SHORT), fine_sub: 1'b0};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // long dead time, no fine tuning: constant difference
    foreach (tab1[i]) begin
      set_fx(tab1[i]);
      tx = FC / tab1[i];
      mean_period(0, 6, mp);
      diff = tx - mp;
      $display("0.6us: fx=%0.0f Hz  C1=fc/fx=%0.1f  C2=fc/fy=%0.1f  diff=%0.2f  fy=%0.1f Hz", tab1[i], tx, mp, diff, FC / mp);
      checks++;
      if (diff < DEAD_LONG - 1.0 || diff > DEAD_LONG + 1.0) begin
        failures++;
        $display("FAIL diff %f, expected %0d", diff, DEAD_LONG);
      end
    end
    // the constant difference removed by the fine-tuning adder
    ctrl_l.fine = FINE_W'(DEAD_LONG);
    foreach (tab1[i]) begin
      set_fx(tab1[i]);
      tx = FC / tab1[i];
      mean_period(0, 6, mp);
      checks++;
      if (mp < tx - 1.0 || mp > tx + 1.0) begin
        failures++;
        $display("FAIL corrected: fx=%0.0f period %f, expected %f", tab1[i], mp, tx);
      end
    end
    // short dead time with fine tuning, up to 3.275 MHz
    foreach (tab2[i]) begin
      set_fx(tab2[i]);
      tx = FC / tab2[i];
      mean_period(1, (tab2[i] > 500.0e3) ? 200 : 6, mp);
      $display("60ns: fx=%0.1f kHz  fy=%0.1f kHz", tab2[i] / 1.0e3, FC / mp / 1.0e3);
      checks++;
      if (mp < tx - 1.0 || mp > tx + 1.0) begin
        failures++;
        $display("FAIL short dead time: fx=%0.1f period %f, expected %f", tab2[i], mp, tx);
      end
    end
    // lower input frequency limit of a 16-bit Counter 1 at 31.111 MHz
    set_fx(470.0);
    wait_loads(1, 3);
    @(posedge clk); @(posedge clk);
    checks++;
    if (!sat[1]) begin failures++; $display("FAIL 470 Hz should overrun 16 bits"); end
    set_fx(480.0);
    wait_loads(1, 3);
    @(posedge clk); @(posedge clk);
    checks++;
    if (sat[1]) begin failures++; $display("FAIL 480 Hz should fit 16 bits (c1=%0d)", c1_s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
