// tb_narnn_out_acc: self-checking test of the output accumulator.
// Random and extreme products and output biases; after each enabled clock
// edge checks the full-precision sum (bias * 2^8 + sum of products), the
// 10-bit result (floor of sum / 2^8, clipped to [-512, 511]) and the
// saturation flag; with en low the stored result must hold.
module tb_narnn_out_acc;
  localparam int N = 5;
  logic clk, rst_n, en, sat;
  logic signed [19:0] prod [N];
  logic signed [9:0] b_o, y;
  logic signed [23:0] y_full;
  longint m_full;
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0;

  narnn_out_acc dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(longint v, int bits);
    return (v >= (64'sd1 <<< (bits - 1))) ? v - (64'sd1 <<< bits) : v;
  endfunction

  initial begin
    longint fl, ey;
    rst_n = 0; en = 0; b_o = 0;
    for (int i = 0; i < N; i++) prod[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_full = 0;
    for (int it = 0; it < 4000; it++) begin
      en = (it % 7 != 3);
      b_o = 10'($urandom);
      for (int i = 0; i < N; i++) begin
        // mostly moderate products, sometimes the largest ones
        prod[i] = (it % 5 == 0) ? 20'($urandom) : 20'(longint'($urandom_range(0, 131072)) - 65536);
        if (it % 211 == 0) prod[i] = 20'sd262144;
        if (it % 223 == 0) prod[i] = -20'sd262144;
      end
      if (en) begin
        m_full = longint'(b_o) * 256;
        for (int i = 0; i < N; i++) m_full += longint'(prod[i]);
      end
      @(posedge clk); #1;
      fl = m_full >>> 8;  // floor division by 256
      ey = fl > 511 ? 511 : (fl < -512 ? -512 : fl);
      checks++;
      if (longint'(y_full) != m_full || longint'(y) != ey || sat != (fl != ey)) begin
        failures++;
        if (failures < 10) $display("it %0d: y_full %0d/%0d y %0d/%0d sat %0b", it, y_full, m_full, y, ey, sat);
      end
      if (fl > 511) n_sat_hi++;
      if (fl < -512) n_sat_lo++;
    end
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
