// tb_fsynth_fracacc -- self-checking test of the correction accumulator.
// For random M and R it steps the accumulator and checks each preset against
// a reference accumulator, and checks that the sum of N periods stays within
// one count of N * (M + R/2**FRAC_W), the property the correction exists for.
// With correction off every period must be M.
module tb_fsynth_fracacc;
  localparam int C2_W = 32, FRAC_W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step = 1'b0, corr_en = 1'b1;
  logic [C2_W-1:0] m = 32'd10, preset;
  logic [FRAC_W-1:0] r = '0, acc;
  logic carry;
  int checks = 0, failures = 0, carries = 0;

  fsynth_fracacc #(.C2_W(C2_W), .FRAC_W(FRAC_W)) dut (
    .clk, .rst_n, .step, .corr_en, .m, .r, .preset, .carry, .acc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_acc, e_carry;
    longint total;
    real ideal;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      corr_en = (t % 5 != 4);
      m = 32'($urandom_range(1, 5000));
      r = FRAC_W'($urandom);
      if (t == 0) r = 8'd179;          // 0.7 of a count: the x5.7 case
      step = 1'b0;
      @(negedge clk);                  // corr_en low clears the accumulator
      ref_acc = corr_en ? int'(acc) : 0;
      total = 0;
      for (int n = 1; n <= 300; n++) begin
        step = ($urandom_range(0, 2) != 0);
        #1;
        if (step) begin
          e_carry = corr_en ? ((ref_acc + int'(r)) >> FRAC_W) : 0;
          checks++;
          if (preset != m + 32'(e_carry) - 1 || carry != e_carry[0]) begin
            failures++;
            $display("FAIL m=%0d r=%0d acc=%0d preset=%0d carry=%b expected carry %0d", m, r, acc, preset, carry, e_carry);
          end
          if (corr_en) ref_acc = (ref_acc + int'(r)) % (1 << FRAC_W);
          total += longint'(preset) + 1;
          carries += e_carry;
        end
        @(negedge clk);
      end
      step = 1'b0;
    end
    // mean-period property over a long run
    @(negedge clk);
    corr_en = 1'b1; m = 32'd5; r = 8'd179;
    @(negedge clk);
    total = 0;
    for (int n = 1; n <= 1000; n++) begin
      step = 1'b1;
      #1;
      total += longint'(preset) + 1;
      ideal = n * (5.0 + 179.0 / 256.0);
      checks++;
      if (total - ideal > 1.0 || ideal - total > 1.0) begin
        failures++;
        $display("FAIL n=%0d total=%0d ideal=%f", n, total, ideal);
      end
      @(negedge clk);
    end
    step = 1'b0;
    checks++;
    if (carries == 0) begin failures++; $display("FAIL no carry seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
