// tb_fsynth_adapt -- self-checking test of the adaptive control.
// Feeds counts below, inside and above the thresholds and overruns, with and
// without enable, and checks the exponent against a reference that steps it
// by one towards the window, within 0 .. 2**EXP_W-1.
module tb_fsynth_adapt;
  localparam int C1_W = 12, EXP_W = 3, LOW = 100, HIGH = 1000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, upd = 1'b0, ovf = 1'b0;
  logic [C1_W-1:0] c1_in = '0;
  logic [EXP_W-1:0] exp;
  logic step_up, step_dn;
  int checks = 0, failures = 0, ups = 0, dns = 0;
  int ref_exp = 0;

  fsynth_adapt #(.C1_W(C1_W), .EXP_W(EXP_W), .LOW_TH(LOW), .HIGH_TH(HIGH)) dut (
    .clk, .rst_n, .en, .upd, .c1_in, .ovf, .exp, .step_up, .step_dn);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 7) != 0);
      upd   = ($urandom_range(0, 1) != 0);
      ovf   = ($urandom_range(0, 15) == 0);
      case ($urandom_range(0, 2))
        0: c1_in = C1_W'($urandom_range(0, LOW - 1));
        1: c1_in = C1_W'($urandom_range(LOW, HIGH));
        default: c1_in = C1_W'($urandom_range(HIGH + 1, (1 << C1_W) - 1));
      endcase
      if (en && upd) begin
        if ((ovf || c1_in > HIGH) && ref_exp < (1 << EXP_W) - 1) begin ref_exp++; ups++; end
        else if (!ovf && c1_in < LOW && ref_exp > 0) begin ref_exp--; dns++; end
      end
      @(negedge clk);
      upd = 1'b0;
      checks++;
      if (exp != EXP_W'(ref_exp)) begin
        failures++;
        $display("FAIL i=%0d exp=%0d expected %0d", i, exp, ref_exp);
      end
    end
    checks++;
    if (ups == 0 || dns == 0) begin failures++; $display("FAIL a direction never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
