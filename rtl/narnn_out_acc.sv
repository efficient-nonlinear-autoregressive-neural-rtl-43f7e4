// narnn_out_acc: output accumulator forming the network's prediction.
//
// When en is high it adds, at the clock edge, the output bias (aligned to
// the products' 2*FRAC_W fraction bits) and the N output-layer products held
// in the PEs' product registers, and stores the sum. The stored sum is
// presented two ways: y_full, at full precision (Q.16), and y, rounded down
// to the 10-bit Q2.8 data format and saturated to [-2, 1.99609375]. sat is
// high while y is clipped. The single adder tree, the truncation and the
// saturation are this design's choices; the document gives the accumulator
// only as a block that sums the output-layer results into Y_t.
module narnn_out_acc
  import narnn_pkg::*;
#(
  parameter int unsigned N  = N_PE,
  parameter int unsigned DW = DATA_W,
  parameter int unsigned FW = FRAC_W,
  parameter int unsigned YW = 2 * DW + $clog2(N + 1) + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic signed [2*DW-1:0]    prod [N],
  input  logic signed [DW-1:0]      b_o,
  output logic signed [YW-1:0]      y_full,
  output logic signed [DW-1:0]      y,
  output logic                      sat
);

  localparam logic signed [YW-1:0] Y_MAX = YW'((2 ** (DW - 1) - 1)) <<< FW;
  localparam logic signed [YW-1:0] Y_MIN = -(YW'(2 ** (DW - 1)) <<< FW);

  logic signed [YW-1:0] sum;

  always_comb begin
    sum = YW'(b_o) <<< FW;
    for (int i = 0; i < N; i++) sum += YW'(prod[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  y_full <= '0;
    else if (en) y_full <= sum;
  end

  always_comb begin
    sat = 1'b0;
    if (y_full > Y_MAX + YW'((2 ** FW) - 1)) begin
      y   = {1'b0, {(DW-1){1'b1}}};
      sat = 1'b1;
    end else if (y_full < Y_MIN) begin
      y   = {1'b1, {(DW-1){1'b0}}};
      sat = 1'b1;
    end else begin
      y   = DW'(y_full >>> FW);
    end
  end

endmodule
