// tb_fsynth_register -- self-checking test of the Register and its control.
// Random counts and control words; the expected M and R are computed here
// with 64-bit arithmetic straight from C2 = C1*mul/2**shr +/- fine, including
// the clamping to 1 .. 2**C2_W-2, and the valid flag after two captures.
module tb_fsynth_register;
  import fsynth_pkg::*;
  localparam int C1_W = 24, C2_W = 32, FRAC_W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load_stb = 1'b0, c1_ovf = 1'b0;
  logic [C1_W-1:0] c1_in = '0, c1;
  g_ctrl_t ctrl;
  logic [C2_W-1:0] m;
  logic [FRAC_W-1:0] r;
  logic valid, sat;
  int checks = 0, failures = 0, clamps = 0;

  fsynth_register #(.C1_W(C1_W), .C2_W(C2_W), .FRAC_W(FRAC_W)) dut (
    .clk, .rst_n, .load_stb, .c1_in, .c1_ovf, .ctrl, .c1, .m, .r, .valid, .sat);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture(input longint unsigned c, input bit ov);
    @(negedge clk);
    c1_in = C1_W'(c); c1_ovf = ov; load_stb = 1'b1;
    @(negedge clk);
    load_stb = 1'b0;
  endtask

  task automatic check(input longint unsigned c, input bit ov, input bit exp_valid);
    longint unsigned mul, fixed, ip, fr;
    longint signed   s;
    longint unsigned e_m, e_r;
    bit e_sat;
    @(negedge clk); @(negedge clk);
    mul   = (ctrl.mul == 0) ? 1 : longint'(ctrl.mul);
    fixed = (c * mul * 65536) >> ctrl.shr;    // C1*mul/2**shr with 16 fraction bits
    ip    = fixed >> 16;
    fr    = fixed & 16'hffff;
    s     = ctrl.fine_sub ? longint'(ip) - longint'(ctrl.fine) : longint'(ip) + longint'(ctrl.fine);
    e_sat = ov;
    if (s <= 0) begin e_m = 1; e_r = 0; e_sat = 1; end
    else if (s > 64'hffff_fffe) begin e_m = 64'hffff_fffe; e_r = 0; e_sat = 1; end
    else begin e_m = longint'(s); e_r = fr; end
    if (e_sat) clamps++;
    checks++;
    if (m != C2_W'(e_m) || r != FRAC_W'(e_r) || sat != e_sat || valid != exp_valid || c1 != C1_W'(c)) begin
      failures++;
      $display("FAIL c1=%0d mul=%0d shr=%0d fine=%0d sub=%b: m=%0d r=%0d sat=%b valid=%b, expected m=%0d r=%0d sat=%b valid=%b",
               c, ctrl.mul, ctrl.shr, ctrl.fine, ctrl.fine_sub, m, r, sat, valid, e_m, e_r, e_sat, exp_valid);
    end
  endtask

  initial begin
    longint unsigned c;
    bit ov;
    ctrl = '{mul: 16'd1, shr: 5'd0, fine: '0, fine_sub: 1'b0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // first capture after reset is not valid, second is
    capture(1000, 0); check(1000, 0, 1'b0);
    capture(1000, 0); check(1000, 0, 1'b1);
    // the source's cases: k1 shift right, m1 shift left, fine add and subtract
    ctrl = '{mul: 16'd1, shr: 5'd3, fine: '0, fine_sub: 1'b0};   check(1000, 0, 1'b1);
    ctrl = '{mul: 16'd256, shr: 5'd0, fine: '0, fine_sub: 1'b0}; check(1000, 0, 1'b1);
    ctrl = '{mul: 16'd1, shr: 5'd0, fine: 23'd18, fine_sub: 1'b0}; check(1000, 0, 1'b1);
    ctrl = '{mul: 16'd1, shr: 5'd0, fine: 23'd18, fine_sub: 1'b1}; check(1000, 0, 1'b1);
    ctrl = '{mul: 16'd1, shr: 5'd0, fine: 23'd5000, fine_sub: 1'b1}; check(1000, 0, 1'b1);
    // x11: mul = round(2**16/11)
    ctrl = '{mul: 16'd5958, shr: 5'd16, fine: '0, fine_sub: 1'b0}; check(1000, 0, 1'b1);
    for (int i = 0; i < 2000; i++) begin
      c  = longint'($urandom_range(0, 32'hffffff));
      if ($urandom_range(0, 3) == 0) c = c & 64'h3ff;
      ov = ($urandom_range(0, 19) == 0);
      ctrl.mul      = 16'($urandom);
      ctrl.shr      = 5'($urandom);
      ctrl.fine     = ($urandom_range(0, 1) == 0) ? '0 : 23'($urandom);
      ctrl.fine_sub = 1'($urandom);
      capture(c, ov);
      check(c, ov, 1'b1);
    end
    checks++;
    if (clamps == 0) begin failures++; $display("FAIL clamping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
