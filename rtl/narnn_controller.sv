// narnn_controller: finite state machine that sequences one inference.
//
// States (names from the published state diagram; encoding, counters and the
// exact per-cycle enables are this design's):
//   S_WAIT    wait for y_rdy. On the accepting edge the new measurement is
//             shifted into the delay states (tap_update) and the PEs are
//             cleared (pe_clr).
//   S_LOADB1  5 cycles: column 0 of the hidden weights and the 5 hidden
//             biases go from the ROM into the weight cache, one PE per cycle.
//   S_L1      1 cycle closing a column. After 16 columns go to S_TANH,
//             otherwise to S_LOAD1.
//   S_LOAD1   5 cycles: the next weight column goes into the cache.
//   S_TANH    5 cycles: the shared tanh table is applied to PE 0..4 in turn.
//   S_LOAD2   5 cycles: the output weights (and output bias) are loaded.
//   S_L2      1 cycle: every PE latches w_o[k] * phi[k].
//   S_OUT     1 cycle: the output accumulator sums the products; y_valid
//             is a registered pulse in the following cycle.
// That is 5+1 + 15*(5+1) + 5 + 5 + 1 = 107 cycles from the accepting edge to
// the end of S_L2, the count the design is specified with, plus the S_OUT
// cycle that forms Y_t.
//
// PE pipeline in the hidden layer: the cache entry of PE k is written in load
// cycle k of a column, the PE latches its product one cycle later (column
// cycle k+1; for PE 4 that is S_L1) and accumulates it one cycle after that.
// Staggering the enables this way lets the accumulation of a column overlap
// the loading of the next, and leaves each PE's sum final by the time the
// tanh table reads it (PE 4, read last, finishes in the first S_TANH cycle).
// The bias enters the accumulator with the first column's product.
//
// ROM addressing: the word address advances once per load cycle. The ROM has
// a one-cycle read, so the controller drives it with the address's next
// value; rom data in any cycle is then the word at the current address.
// Concurrent assertions at the end state the sequence's rules: a sample is
// taken only in S_WAIT, y_valid is a one-cycle pulse, an accumulation always
// follows a product latch, the ROM address stays in range, and the cache is
// never loaded while the tanh table is in use.
module narnn_controller
  import narnn_pkg::*;
#(
  parameter int unsigned N     = N_PE,
  parameter int unsigned TAPS  = N_TAP,
  parameter int unsigned DEPTH = N_TAP * N_PE + N_PE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     y_rdy,
  output logic                     ready,       // in S_WAIT
  output state_t                   state,
  // parameter ROM
  output logic [$clog2(DEPTH)-1:0] rom_addr,
  // weight cache
  output logic                     cache_we,
  output logic                     cache_b_we,
  output logic [$clog2(N)-1:0]     cache_idx,
  // delay states
  output logic                     tap_update,
  output logic [$clog2(TAPS)-1:0]  tap_sel,
  // PEs
  output logic                     pe_clr,
  output logic [N-1:0]             pe_mul_en,
  output logic [N-1:0]             pe_acc_en,
  output logic                     pe_b_load,
  output logic                     layer_sel,
  // tanh table
  output logic                     tanh_we,
  output logic [$clog2(N)-1:0]     tanh_sel,
  // output
  output logic                     out_en,
  output logic                     y_valid
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned KW = $clog2(N);
  localparam int unsigned CW = $clog2(TAPS);

  state_t          state_d;
  logic [KW-1:0]   k_q, k_d;        // load / tanh step within a phase
  logic [CW-1:0]   col_q, col_d;    // current column (delay state)
  logic [AW-1:0]   addr_q, addr_d;
  logic [N-1:0]    mul_l1;          // hidden-layer product enables
  logic            first_col_q;     // products being latched belong to column 0

  // Next state and counters.
  always_comb begin
    state_d = state;
    k_d     = k_q;
    col_d   = col_q;
    addr_d  = addr_q;
    unique case (state)
      S_WAIT: begin
        k_d    = '0;
        col_d  = '0;
        addr_d = '0;
        if (y_rdy) state_d = S_LOADB1;
      end
      S_LOADB1, S_LOAD1: begin
        addr_d = addr_q + 1'b1;
        k_d    = k_q + 1'b1;
        if (k_q == KW'(N - 1)) begin
          k_d     = '0;
          state_d = S_L1;
        end
      end
      S_L1: begin
        if (col_q == CW'(TAPS - 1)) begin
          state_d = S_TANH;
        end else begin
          col_d   = col_q + 1'b1;
          state_d = S_LOAD1;
        end
      end
      S_TANH: begin
        k_d = k_q + 1'b1;
        if (k_q == KW'(N - 1)) begin
          k_d     = '0;
          state_d = S_LOAD2;
        end
      end
      S_LOAD2: begin
        addr_d = addr_q + 1'b1;
        k_d    = k_q + 1'b1;
        if (k_q == KW'(N - 1)) begin
          k_d     = '0;
          addr_d  = '0;  // last word read: rewind for the next sample
          state_d = S_L2;
        end
      end
      S_L2:  state_d = S_OUT;
      S_OUT: begin
        addr_d  = '0;
        state_d = S_WAIT;
      end
      default: state_d = S_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_WAIT;
      k_q    <= '0;
      col_q  <= '0;
      addr_q <= '0;
    end else begin
      state  <= state_d;
      k_q    <= k_d;
      col_q  <= col_d;
      addr_q <= addr_d;
    end
  end

  assign rom_addr = addr_d;
  assign ready    = (state == S_WAIT);

  // Weight cache.
  assign cache_we   = (state == S_LOADB1) || (state == S_LOAD1) || (state == S_LOAD2);
  assign cache_b_we = (state == S_LOADB1) || (state == S_LOAD2 && k_q == '0);
  assign cache_idx  = k_q;

  // Delay states.
  assign tap_update = (state == S_WAIT) && y_rdy;
  assign tap_sel    = col_q;

  // PE product enables: PE k latches in column cycle k+1 (PE N-1 in S_L1),
  // all PEs together in S_L2.
  always_comb begin
    mul_l1 = '0;
    if (state == S_LOADB1 || state == S_LOAD1) begin
      for (int i = 0; i < N - 1; i++)
        if (k_q == KW'(i + 1)) mul_l1[i] = 1'b1;
    end else if (state == S_L1) begin
      mul_l1[N-1] = 1'b1;
    end
  end

  assign pe_clr    = tap_update;
  assign pe_mul_en = mul_l1 | {N{state == S_L2}};
  assign layer_sel = (state == S_LOAD2) || (state == S_L2) || (state == S_OUT);

  // Accumulation follows each hidden-layer product by one cycle; the bias is
  // added with the products of column 0.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pe_acc_en   <= '0;
      first_col_q <= 1'b0;
      y_valid     <= 1'b0;
    end else begin
      pe_acc_en   <= mul_l1;
      first_col_q <= (state == S_LOADB1) || (state == S_L1 && col_q == '0);
      y_valid     <= (state == S_OUT);
    end
  end
  assign pe_b_load = first_col_q;

  // Tanh table: PE k in tanh cycle k.
  assign tanh_we  = (state == S_TANH);
  assign tanh_sel = k_q;

  assign out_en = (state == S_OUT);

  // Rules of the sequence.
  a_take_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    tap_update |-> ready);
  a_valid_is_a_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    y_valid |=> !y_valid);
  a_accumulate_after_product: assert property (@(posedge clk) disable iff (!rst_n)
    |pe_acc_en |-> $past(|pe_mul_en));
  a_rom_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    rom_addr < AW'(DEPTH));
  a_no_load_during_tanh: assert property (@(posedge clk) disable iff (!rst_n)
    !(cache_we && tanh_we));

endmodule
