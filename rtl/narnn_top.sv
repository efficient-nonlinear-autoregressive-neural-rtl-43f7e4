// narnn_top: pipelined nonlinear autoregressive neural network (NARNN)
// predictor, 5 hidden neurons by 16 delay taps by default.
//
// For each new measurement y_in (accepted when y_rdy is high and ready is
// high) the design shifts the measurement into its delay states and computes
//   Y = b_o + sum_k wo[k] * tanh(b[k] + sum_j w[k][j] * D[j])
// the one-step-ahead prediction. One processing element (PE) per neuron does
// the multiply-accumulate work; the hidden layer is processed one delay state
// (one column of weights) at a time: the controller loads the column from the
// parameter ROM into the weight cache, one PE per cycle, and the PEs latch
// their products. A single tanh table then serves the PEs in turn, its
// results are fed back into the PEs as multiplicands for the output weights,
// and the output accumulator sums the PE products with the output bias.
//
// Interface: y_in is Q2.8 (10-bit signed, 8 fraction bits), as are all
// parameters. y is the prediction in the same format (rounded down,
// saturated), y_full the unrounded sum with 16 fraction bits. y_valid pulses
// for one cycle when y and y_full are new; they hold until the next result.
// Timing: 107 cycles of processing after the accepting edge plus one output
// cycle; y_valid goes high at the 108th clock edge after the accepting edge (see
// narnn_controller). The structure (ROM, weight cache, tap delay, controller,
// 5 PEs, one tanh LUT, output accumulator) follows the published block
// diagram; widths beyond the 10-bit data format, the ROM word layout, the
// tanh table and the handshake are this design's own.
module narnn_top
  import narnn_pkg::*;
#(
  parameter int unsigned N         = N_PE,
  parameter int unsigned TAPS      = N_TAP,
  parameter string       ROM_FILE  = "rtl/narnn_weights.hex"
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        y_rdy,
  input  data_t                       y_in,
  output logic                        ready,
  output logic                        y_valid,
  output data_t                       y,
  output logic signed [PROD_W+$clog2(N+1):0] y_full,
  output logic                        y_sat,
  output logic                        tanh_sat,
  output state_t                      state      // controller state, for monitoring
);

  localparam int unsigned DEPTH = TAPS * N + N;

  logic [$clog2(DEPTH)-1:0]     rom_addr;
  rom_word_t                    rom_q;
  logic                         cache_we, cache_b_we;
  logic [$clog2(N)-1:0]         cache_idx;
  logic                         tap_update;
  logic [$clog2(TAPS)-1:0]      tap_sel;
  logic                         pe_clr, pe_b_load, layer_sel;
  logic [N-1:0]                 pe_mul_en, pe_acc_en;
  logic                         tanh_we;
  logic [$clog2(N)-1:0]         tanh_sel;
  logic                         out_en;

  data_t                        w_c   [N];
  data_t                        b_c   [N];
  data_t                        x;
  data_t                        phi   [N];
  logic signed [PROD_W-1:0]     prod  [N];
  logic signed [ACC_W-1:0]      acc   [N];

  narnn_controller #(.N(N), .TAPS(TAPS), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .y_rdy, .ready, .state, .rom_addr,
    .cache_we, .cache_b_we, .cache_idx, .tap_update, .tap_sel,
    .pe_clr, .pe_mul_en, .pe_acc_en, .pe_b_load, .layer_sel,
    .tanh_we, .tanh_sel, .out_en, .y_valid
  );

  narnn_weight_rom #(.DEPTH(DEPTH), .INIT_FILE(ROM_FILE)) u_rom (
    .clk, .addr(rom_addr), .rdata(rom_q)
  );

  narnn_weight_cache #(.N(N)) u_cache (
    .clk, .rst_n, .we(cache_we), .b_we(cache_b_we), .idx(cache_idx),
    .w_in(rom_q.w), .b_in(rom_q.b), .w_out(w_c), .b_out(b_c)
  );

  narnn_tap_delay #(.TAPS(TAPS)) u_taps (
    .clk, .rst_n, .update(tap_update), .y_in, .sel(tap_sel), .x
  );

  for (genvar k = 0; k < N; k++) begin : g_pe
    narnn_pe u_pe (
      .clk, .rst_n, .clr(pe_clr), .mul_en(pe_mul_en[k]), .acc_en(pe_acc_en[k]),
      .b_load(pe_b_load), .layer_sel, .w(w_c[k]), .b(b_c[k]), .x, .phi(phi[k]),
      .prod(prod[k]), .acc(acc[k])
    );
  end

  narnn_tanh_lut #(.N(N)) u_tanh (
    .clk, .rst_n, .we(tanh_we), .sel(tanh_sel), .acc_in(acc), .phi, .sat(tanh_sat)
  );

  narnn_out_acc #(.N(N)) u_out (
    .clk, .rst_n, .en(out_en), .prod, .b_o(b_c[0]), .y_full, .y, .sat(y_sat)
  );

endmodule
