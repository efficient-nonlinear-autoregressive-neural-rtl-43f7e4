// narnn_pe: one neuron processing element (multiply-accumulate).
//
// The PE holds everything of a hidden neuron except the activation function.
// Operands: w (weight, from the weight cache), b (bias, from the weight cache)
// and two candidate multiplicands: x (the delay state of the current column)
// and phi (the tanh of this PE's own hidden result, fed back for the output
// layer). layer_sel picks between them, as the Layer_sel mux in the
// published PE diagram does.
//
// Two internal registers, as the design describes: a product register
// (PROD_W bits, Q4.16 for 10-bit Q2.8 operands) and an accumulator one bit
// wider (ACC_W bits). Timing: when mul_en is high the product register
// captures w*x at the clock edge; when acc_en is high the accumulator adds
// the product register and, if b_load is high, the bias aligned to the
// product's fraction point (the b_load mux otherwise feeds zero). The two
// registers form a two-stage pipeline, so a product latched in one cycle is
// accumulated in the next. clr synchronously empties both registers (the
// controller's Rst, used at the start of each inference).
//
// Choices of this design: synchronous active-low reset and synchronous clear;
// the accumulator wraps on overflow (the document only says it has one
// overflow bit).
module narnn_pe
  import narnn_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned FW = FRAC_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr,
  input  logic                      mul_en,
  input  logic                      acc_en,
  input  logic                      b_load,
  input  logic                      layer_sel, // 0: delay state x, 1: phi
  input  logic signed [DW-1:0]      w,
  input  logic signed [DW-1:0]      b,
  input  logic signed [DW-1:0]      x,
  input  logic signed [DW-1:0]      phi,
  output logic signed [2*DW-1:0]    prod,      // product register
  output logic signed [2*DW:0]      acc        // accumulator ("out")
);

  logic signed [DW-1:0]   operand;
  logic signed [2*DW:0]   bias_ext;
  logic signed [2*DW:0]   addend;

  assign operand  = layer_sel ? phi : x;
  // Bias moved to the product's fraction point: FW more fraction bits.
  assign bias_ext = (2*DW+1)'(b) <<< FW;
  assign addend   = b_load ? bias_ext : '0;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      prod <= '0;
      acc  <= '0;
    end else begin
      if (mul_en) prod <= w * operand;
      if (acc_en) acc  <= acc + (2*DW+1)'(prod) + addend;
    end
  end

endmodule
