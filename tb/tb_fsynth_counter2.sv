// tb_fsynth_counter2 -- self-checking test of Counter 2.
// Uses the board's shape, two 8-bit slices. With a random fc2 enable and a
// random preset it checks that consecutive fy pulses are preset+1 fc2 pulses
// apart, that the counter reloads exactly at fy, that no fy appears while run
// is low, and that fy_half toggles on every fy.
module tb_fsynth_counter2;
  localparam int W = 16, SW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce = 1'b0, run = 1'b0;
  logic [W-1:0] preset = '0, count;
  logic reload, fy, fy_half;
  int checks = 0, failures = 0;

  fsynth_counter2 #(.W(W), .SLICE_W(SW)) dut (
    .clk, .rst_n, .ce, .run, .preset, .count, .reload, .fy, .fy_half);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ces, pulses;
    logic half_prev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // idle: no output while run is low
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); ce = 1'b1; preset = 16'd9;
      #1; checks++;
      if (fy) begin failures++; $display("FAIL fy while run low"); end
    end
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      ce = 1'b0;
      case (t)
        0: preset = 16'd0;       // period 1
        1: preset = 16'd255;     // crosses the slice boundary
        2: preset = 16'd256;
        default: preset = 16'($urandom_range(0, 700));
      endcase
      run = 1'b1;
      // wait for the first fy with this preset loaded before measuring
      pulses = 0; ces = 0;
      for (int guard = 0; pulses < 6; guard++) begin
        if (guard > 8 * 8 * (int'(preset) + 2)) begin
          failures++;
          $display("FAIL preset=%0d: no regular fy pulses", preset);
          break;
        end
        @(negedge clk);
        ce = ($urandom_range(0, 3) != 0);
        #1;
        if (ce) ces++;
        if (fy) begin
          pulses++;
          if (pulses >= 3) begin
            checks++;
            if (ces != int'(preset) + 1) begin
              failures++;
              $display("FAIL preset=%0d fy after %0d fc2 pulses", preset, ces);
            end
          end
          checks++;
          if (!reload) begin failures++; $display("FAIL fy without reload"); end
          half_prev = fy_half;
          @(posedge clk); #1;
          checks++;
          if (fy_half == half_prev) begin failures++; $display("FAIL fy_half did not toggle"); end
          ces = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
