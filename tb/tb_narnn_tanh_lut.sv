// tb_narnn_tanh_lut: self-checking test of the shared tanh table.
// Applies edge-case and random accumulator values to random PEs and checks
// the stored activation against tanh computed here in floating point:
// expected = sign(a) * round(256 * tanh((floor(|a| / 2^10) + 0.5) / 64)),
// with the step index limited to 255 (saturation beyond |a| >= 4.0).
// Also checks that only the selected phi register changes, and the sat flag.
module tb_narnn_tanh_lut;
  localparam int N = 5, AW = 21;
  logic clk, rst_n, we, sat;
  logic [2:0] sel;
  logic signed [AW-1:0] acc_in [N];
  logic signed [9:0] phi [N];
  logic signed [9:0] model [N];
  int checks = 0, failures = 0, n_sat = 0;

  narnn_tanh_lut dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_tanh(longint a);
    longint mag = a < 0 ? -a : a;
    longint idx = mag / 1024;
    real v;
    int r;
    if (idx > 255) idx = 255;
    v = $tanh((real'(idx) + 0.5) / 64.0) * 256.0;
    r = int'($floor(v + 0.5));
    return a < 0 ? -r : r;
  endfunction

  task automatic apply(longint a);
    int s;
    logic exp_sat;
    s = $urandom_range(0, N - 1);
    for (int i = 0; i < N; i++) acc_in[i] = AW'($urandom);
    acc_in[s] = AW'(a);
    sel = 3'(s);
    we = 1;
    #1;
    exp_sat = ((a < 0 ? -a : a) / 1024) > 255;
    checks++;
    if (sat !== exp_sat) begin
      failures++;
      $display("sat flag wrong for %0d", a);
    end
    if (exp_sat) n_sat++;
    @(posedge clk);
    model[s] = 10'(expect_tanh(a));
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (phi[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("phi[%0d]=%0d expected %0d (input %0d)", i, phi[i], model[i], a);
      end
    end
  endtask

  initial begin
    rst_n = 0; we = 0; sel = 0;
    for (int i = 0; i < N; i++) begin acc_in[i] = '0; model[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // edge cases: zero, step edges, saturation boundaries, extremes
    apply(0); apply(1023); apply(1024); apply(-1); apply(-1024); apply(-1025);
    apply(262143); apply(262144); apply(-262144); apply(-262145);
    apply(1048575); apply(-1048576);
    for (int i = 0; i < 3000; i++) begin
      if (i % 2 == 0) apply(longint'($urandom_range(0, 600000)) - 300000);
      else apply(longint'($urandom_range(0, 2097151)) - 1048576);
      // hold (we low) a cycle now and then: nothing may change
      if (i % 50 == 0) begin
        we = 0;
        @(posedge clk); #1;
        for (int k = 0; k < N; k++) begin
          checks++;
          if (phi[k] !== model[k]) failures++;
        end
      end
    end
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
