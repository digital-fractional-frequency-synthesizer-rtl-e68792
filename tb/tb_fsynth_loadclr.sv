// tb_fsynth_loadclr -- self-checking test of the LOAD/CLEAR sequencer.
// Drives fx edges at random times and checks, cycle by cycle, that the strobe
// appears three cycles after the edge, LOAD lasts LOAD_CYC cycles with
// enable low, CLEAR follows for CLEAR_CYC cycles, and an edge arriving during
// LOAD or CLEAR is ignored.
module tb_fsynth_loadclr;
  localparam int LC = 3, CC = 2;
  logic clk = 1'b0, rst_n = 1'b0, fx = 1'b0;
  logic load, load_stb, clear, enable, edge_seen;
  int checks = 0, failures = 0;
  int ignored = 0;

  fsynth_loadclr #(.LOAD_CYC(LC), .CLEAR_CYC(CC)) dut (
    .clk, .rst_n, .fx_async(fx), .load, .load_stb, .clear, .enable, .edge_seen);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: expected outputs from the fx edge history.
  int  busy = 0;        // cycles of LOAD+CLEAR still to run
  logic [2:0] sh = '0;  // fx as seen after the synchronizer
  logic e_load, e_clear, e_stb;
  always @(posedge clk) begin
    if (rst_n) begin
      e_load  = (busy > CC);
      e_clear = (busy > 0) && (busy <= CC);
      checks++;
      if (load !== e_load || clear !== e_clear || enable !== !e_load || load_stb !== (busy == LC + CC)) begin
        failures++;
        $display("FAIL t=%0t busy=%0d load=%b clear=%b enable=%b stb=%b", $time, busy, load, clear, enable, load_stb);
      end
      if (sh[1] && !sh[2] && busy == 0) busy = LC + CC;
      else begin
        if (sh[1] && !sh[2]) ignored++;
        if (busy > 0) busy--;
      end
      sh = {sh[1:0], fx};
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      repeat ($urandom_range(1, 12)) @(negedge clk);
      fx = ~fx;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (ignored == 0) begin
      failures++;
      $display("FAIL no edge fell inside LOAD/CLEAR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
