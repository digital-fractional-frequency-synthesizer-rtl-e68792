// tb_fsynth_counter1 -- self-checking test of Counter 1.
// Random ce, enable and clear; a reference count in the testbench is compared
// every cycle, including saturation at all ones and the overrun flag.
module tb_fsynth_counter1;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce = 1'b0, enable = 1'b0, clr = 1'b0;
  logic [W-1:0] count;
  logic ovf;
  int checks = 0, failures = 0, ovf_seen = 0;
  int ref_cnt = 0;
  bit ref_ovf = 0;

  fsynth_counter1 #(.W(W)) dut (.clk, .rst_n, .ce, .enable, .clr, .count, .ovf);

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
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (count != W'(ref_cnt) || ovf != ref_ovf) begin
        failures++;
        $display("FAIL i=%0d count=%0d ref=%0d ovf=%b ref_ovf=%b", i, count, ref_cnt, ovf, ref_ovf);
      end
      if (ovf) ovf_seen++;
      ce     = ($urandom_range(0, 3) != 0);
      enable = ($urandom_range(0, 9) != 0);
      clr    = ($urandom_range(0, 599) == 0);
      // model of the next clock edge
      if (clr) begin ref_cnt = 0; ref_ovf = 0; end
      else if (ce && enable) begin
        if (ref_cnt == (1 << W) - 1) ref_ovf = 1;
        else ref_cnt++;
      end
    end
    checks++;
    if (ovf_seen == 0) begin failures++; $display("FAIL overrun never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
