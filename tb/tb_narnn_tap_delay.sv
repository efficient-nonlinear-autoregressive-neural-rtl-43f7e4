// tb_narnn_tap_delay: self-checking test of the delay states.
// Shifts in random samples (update high at random), keeps a queue of the
// expected history here, and reads every tap through sel after each edge.
module tb_narnn_tap_delay;
  localparam int TAPS = 16;
  logic clk, rst_n, update;
  logic signed [9:0] y_in, x;
  logic [3:0] sel;
  logic signed [9:0] hist [TAPS];
  int checks = 0, failures = 0, n_upd = 0;

  narnn_tap_delay dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; update = 0; y_in = 0; sel = 0;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      update = ($urandom_range(0, 3) != 0);
      y_in = 10'($urandom);
      @(posedge clk); #1;
      if (update) begin
        for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = y_in;
        n_upd++;
      end
      update = 0;
      for (int j = 0; j < TAPS; j++) begin
        sel = 4'(j);
        #1;
        checks++;
        if (x !== hist[j]) begin
          failures++;
          if (failures < 10) $display("it %0d tap %0d: %0d expected %0d", it, j, x, hist[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
