// tb_narnn_weight_cache: self-checking test of the weight cache.
// Random writes (with and without the bias write enable) to random entries;
// after each edge all weight and bias outputs are compared with a model.
module tb_narnn_weight_cache;
  localparam int N = 5;
  logic clk, rst_n, we, b_we;
  logic [2:0] idx;
  logic signed [9:0] w_in, b_in;
  logic signed [9:0] w_out [N], b_out [N];
  logic signed [9:0] mw [N], mb [N];
  int checks = 0, failures = 0;

  narnn_weight_cache dut (.*);

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
    rst_n = 0; we = 0; b_we = 0; idx = 0; w_in = 0; b_in = 0;
    for (int i = 0; i < N; i++) begin mw[i] = 0; mb[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      we = 1'($urandom); b_we = 1'($urandom);
      idx = 3'($urandom_range(0, N - 1));
      w_in = 10'($urandom); b_in = 10'($urandom);
      @(posedge clk); #1;
      if (we) begin
        mw[idx] = w_in;
        if (b_we) mb[idx] = b_in;
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (w_out[i] !== mw[i] || b_out[i] !== mb[i]) begin
          failures++;
          if (failures < 10) $display("it %0d entry %0d: w %0d/%0d b %0d/%0d", it, i, w_out[i], mw[i], b_out[i], mb[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
