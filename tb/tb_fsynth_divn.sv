// tb_fsynth_divn -- self-checking test of the divide-by-N.
// Drives fo as a square wave of P clk cycles and checks that q has one rising
// edge every N*P cycles, for several N including the pass-through N = 1.
module tb_fsynth_divn;
  logic clk = 1'b0, rst_n = 1'b0, fo = 1'b0;
  logic [15:0] n;
  logic q;
  int checks = 0, failures = 0;
  int half_p = 3;

  fsynth_divn #(.N_W(16)) dut (.clk, .rst_n, .fo_async(fo), .n, .q);

  always #5 clk = ~clk;
  always begin
    repeat (half_p) @(negedge clk);
    fo = ~fo;
  end

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_n(input int nn, input int hp);
    int d;
    logic qp;
    n = 16'(nn); half_p = hp;
    repeat (4 * nn * hp + 20) @(posedge clk);
    // wait for a rising edge of q
    qp = q;
    do begin qp = q; @(negedge clk); end while (!(q && !qp));
    for (int k = 0; k < 4; k++) begin
      d = 0;
      do begin qp = q; @(negedge clk); d++; end while (!(q && !qp));
      checks++;
      if (d != nn * 2 * hp) begin
        failures++;
        $display("FAIL N=%0d P=%0d period %0d expected %0d", nn, 2 * hp, d, nn * 2 * hp);
      end
    end
  endtask

  initial begin
    n = 16'd1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_n(1, 3);
    run_n(2, 3);
    run_n(3, 2);
    run_n(7, 4);
    run_n(16, 2);
    run_n(101, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
