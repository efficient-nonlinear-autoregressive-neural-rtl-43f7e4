// narnn_weight_cache: register file holding one weight per PE and one bias
// per PE.
//
// The controller fills it from the parameter ROM one entry per cycle: while
// we is high, entry idx takes w_in, and if b_we is also high the bias entry
// idx takes b_in. All entries are read in parallel, one weight and one bias
// going to each PE. During the hidden layer it holds one column of weights
// (the weights all neurons apply to one delay state) and the hidden biases;
// during the output layer it holds the output weights, and bias entry 0
// holds the output bias. The cache is written in the cycle after the ROM
// word is read, and its outputs change at that clock edge.
// Reset clears all entries (this design's choice).
module narnn_weight_cache
  import narnn_pkg::*;
#(
  parameter int unsigned N  = N_PE,
  parameter int unsigned DW = DATA_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic                         b_we,
  input  logic [$clog2(N)-1:0]         idx,
  input  logic signed [DW-1:0]         w_in,
  input  logic signed [DW-1:0]         b_in,
  output logic signed [DW-1:0]         w_out [N],
  output logic signed [DW-1:0]         b_out [N]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        w_out[i] <= '0;
        b_out[i] <= '0;
      end
    end else if (we) begin
      w_out[idx] <= w_in;
      if (b_we) b_out[idx] <= b_in;
    end
  end

endmodule
