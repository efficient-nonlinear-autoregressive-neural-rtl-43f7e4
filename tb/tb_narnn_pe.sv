// tb_narnn_pe: self-checking test of the processing element.
// Two PEs are tested side by side: one at the default 10-bit Q2.8 format and
// one at 14 bits with 10 fraction bits, since the PE is meant to serve other
// fixed-point formats too. Both get random operands and random enable
// patterns (product latch, accumulate, bias load, layer select, clear), with
// extreme operands now and then. After every clock edge the product register
// and accumulator are compared with a model kept here as plain integers:
// product = w * (layer_sel ? phi : x); accumulator wraps at 2*DW+1 bits;
// bias is scaled by 2^FW.
module tb_narnn_pe;
  localparam int DW = 10, FW = 8;   // default format
  localparam int DW2 = 14, FW2 = 10; // second format
  logic clk, rst_n;
  logic clr, mul_en, acc_en, b_load, layer_sel;
  logic signed [DW-1:0] w, b, x, phi;
  logic signed [2*DW-1:0] prod;
  logic signed [2*DW:0] acc;
  logic signed [DW2-1:0] w2, b2, x2, phi2;
  logic signed [2*DW2-1:0] prod2;
  logic signed [2*DW2:0] acc2;
  int checks = 0, failures = 0;

  narnn_pe dut (.*);

  narnn_pe #(.DW(DW2), .FW(FW2)) dut2 (
    .clk, .rst_n, .clr, .mul_en, .acc_en, .b_load, .layer_sel,
    .w(w2), .b(b2), .x(x2), .phi(phi2), .prod(prod2), .acc(acc2)
  );

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap(longint v, int bits);
    longint m = v & ((64'sd1 <<< bits) - 1);
    if (m >= (64'sd1 <<< (bits - 1))) m -= (64'sd1 <<< bits);
    return m;
  endfunction

  // One PE's model state and its update for one clock edge.
  typedef struct { longint prod, acc; } model_t;

  function automatic model_t step(model_t m, int dw, int fw, longint wv, longint bv,
                                  longint xv, longint pv);
    model_t n = m;
    if (clr) begin
      n.prod = 0; n.acc = 0;
    end else begin
      if (acc_en) n.acc = wrap(m.acc + m.prod + (b_load ? bv * (64'sd1 <<< fw) : 0), 2*dw+1);
      if (mul_en) n.prod = wv * (layer_sel ? pv : xv);
    end
    return n;
  endfunction

  model_t m1, m2;

  initial begin
    rst_n = 0;
    {clr, mul_en, acc_en, b_load, layer_sel} = '0;
    w = 0; b = 0; x = 0; phi = 0; w2 = 0; b2 = 0; x2 = 0; phi2 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m1 = '{0, 0}; m2 = '{0, 0};
    for (int i = 0; i < 5000; i++) begin
      w = DW'($urandom); b = DW'($urandom); x = DW'($urandom); phi = DW'($urandom);
      w2 = DW2'($urandom); b2 = DW2'($urandom); x2 = DW2'($urandom); phi2 = DW2'($urandom);
      if (i % 97 == 0) begin
        w = -512; x = -512; phi = -512; b = -512;
        w2 = -8192; x2 = -8192; phi2 = -8192; b2 = -8192;
      end
      if (i % 89 == 0) begin
        w = 511; x = 511; phi = 511; b = 511;
        w2 = 8191; x2 = 8191; phi2 = 8191; b2 = 8191;
      end
      mul_en = 1'($urandom); acc_en = 1'($urandom);
      b_load = 1'($urandom); layer_sel = 1'($urandom);
      clr = ($urandom_range(0, 40) == 0);
      @(posedge clk);
      m1 = step(m1, DW, FW, longint'(w), longint'(b), longint'(x), longint'(phi));
      m2 = step(m2, DW2, FW2, longint'(w2), longint'(b2), longint'(x2), longint'(phi2));
      #1;
      checks++;
      if (longint'(prod) != m1.prod || longint'(acc) != m1.acc) begin
        failures++;
        if (failures < 10) $display("Q2.8 mismatch at %0d: prod %0d/%0d acc %0d/%0d", i, prod, m1.prod, acc, m1.acc);
      end
      checks++;
      if (longint'(prod2) != m2.prod || longint'(acc2) != m2.acc) begin
        failures++;
        if (failures < 10) $display("Q4.10 mismatch at %0d: prod %0d/%0d acc %0d/%0d", i, prod2, m2.prod, acc2, m2.acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
