// tb_fsynth_gen -- self-checking test of the generator clock enable.
// For several (div, exp) settings it measures the distance between ce pulses
// and compares it with max(div,1) * 2**exp, worked out here.
module tb_fsynth_gen;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] div;
  logic [2:0] exp;
  logic       ce;
  int checks = 0, failures = 0;

  fsynth_gen #(.DIV_W(8), .EXP_W(3)) dut (.clk, .rst_n, .div, .exp, .ce);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int d, input int e);
    int expected, last, n;
    div = 8'(d); exp = 3'(e);
    expected = ((d == 0) ? 1 : d) << e;
    // let the new setting take effect: wait for two ce pulses
    repeat (2) begin
      @(posedge clk);
      while (!ce) @(posedge clk);
    end
    last = 0; n = 0;
    for (int k = 0; k < 5; k++) begin
      n = 0;
      do begin @(posedge clk); n++; end while (!ce);
      checks++;
      if (n != expected) begin
        failures++;
        $display("FAIL div=%0d exp=%0d distance=%0d expected=%0d", d, e, n, expected);
      end
    end
  endtask

  initial begin
    div = 8'd1; exp = 3'd0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    measure(1, 0);
    measure(0, 0);
    measure(3, 0);
    measure(3, 2);
    measure(1, 7);
    measure(7, 3);
    for (int i = 0; i < 10; i++) measure(int'($urandom_range(1, 20)), int'($urandom_range(0, 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
