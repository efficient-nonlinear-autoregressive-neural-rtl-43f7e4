// tb_narnn_top: end-to-end test of the NARNN predictor at its default size
// (5 neurons, 16 taps, no parameter overrides).
//
// Stimulus: a 300-sample synthetic glucose-like trace, normalised to the
// Q2.8 input range (slow daily swing plus a faster component and a little
// noise), with sensor-fault-like spikes and two held extreme stretches
// (+1.99 and -2.0) that drive hidden neurons into tanh saturation. 300
// samples is about the length of one recorded trial (one sample every five
// minutes for a day).
//
// Reference: the parameters are read from the same parameter file with
// $fscanf and the network is evaluated here with integer arithmetic:
//   h_k  = wrap21(b_k * 2^8 + sum_j w[k][j] * D[j])
//   phi_k = sign(h_k) * round(256 * tanh((min(floor(|h_k| / 2^10), 255) + 0.5) / 64))
//   Y    = b_o * 2^8 + sum_k wo[k] * phi_k ;  y = clip(floor(Y / 2^8))
// with D[0] the newest sample and D[j] older ones (zero before any sample).
// Each prediction must match exactly and arrive 108 clock edges after the
// sample is taken. Mechanisms counted (each must occur): waiting with no new
// sample, a sample offered while busy (ignored), delay-state update, column
// load (S_LOADB1/S_LOAD1), layer swap to the output layer (S_LOAD2/S_L2),
// tanh lookups, tanh input saturation. Output clipping is counted and
// reported.
module tb_narnn_top;
  import narnn_pkg::*;
  localparam int N = 5, TAPS = 16, DEPTH = 85, SAMPLES = 300;

  logic clk, rst_n, y_rdy, ready, y_valid, y_sat, tanh_sat;
  data_t y_in, y;
  logic signed [23:0] y_full;
  state_t state;

  narnn_top dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (SAMPLES * 160 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  longint W [N][TAPS], B [N], WO [N], BO;
  longint hist [TAPS];

  function automatic longint sx(longint v, int bits);
    v = v & ((64'sd1 <<< bits) - 1);
    return (v >= (64'sd1 <<< (bits - 1))) ? v - (64'sd1 <<< bits) : v;
  endfunction

  function automatic longint tanh_q(longint a);
    longint mag = a < 0 ? -a : a;
    longint idx = mag / 1024;
    longint r;
    if (idx > 255) idx = 255;
    r = longint'($floor($tanh((real'(idx) + 0.5) / 64.0) * 256.0 + 0.5));
    return a < 0 ? -r : r;
  endfunction

  task automatic load_params();
    int fd, n;
    logic [19:0] word;
    fd = $fopen("rtl/narnn_weights.hex", "r");
    if (fd == 0) begin failures++; $display("cannot open parameter file"); return; end
    for (int a = 0; a < DEPTH; a++) begin
      n = $fscanf(fd, "%h", word);
      if (n != 1) failures++;
      if (a < TAPS * N) begin
        W[a % N][a / N] = sx(longint'(word[19:10]), 10);
        if (a < N) B[a] = sx(longint'(word[9:0]), 10);
      end else begin
        WO[a - TAPS * N] = sx(longint'(word[19:10]), 10);
        if (a == TAPS * N) BO = sx(longint'(word[9:0]), 10);
      end
    end
    $fclose(fd);
  endtask

  longint exp_full, exp_y;
  int n_hsat;
  task automatic model_step(longint sample);
    longint h, phi [N];
    for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = sample;
    exp_full = BO * 256;
    for (int k = 0; k < N; k++) begin
      h = B[k] * 256;
      for (int j = 0; j < TAPS; j++) h += W[k][j] * hist[j];
      h = sx(h, 21);
      if ((h < 0 ? -h : h) / 1024 > 255) n_hsat++;
      phi[k] = tanh_q(h);
      exp_full += WO[k] * phi[k];
    end
    exp_y = exp_full >>> 8;
    if (exp_y > 511) exp_y = 511;
    if (exp_y < -512) exp_y = -512;
  endtask

  function automatic longint stimulus(int t);
    real g;
    if (t >= 120 && t < 140) return 509;       // held high (+1.99)
    if (t >= 200 && t < 222) return -512;      // held low (-2.0)
    if (t % 53 == 17) return (t % 2 == 1) ? 480 : -470;  // isolated spike
    g = 0.75 * $sin(6.2831853 * t / 96.0) + 0.25 * $sin(6.2831853 * t / 23.0)
        + 0.02 * (real'($urandom_range(0, 100)) - 50.0) / 50.0;
    return longint'($floor(g * 256.0 + 0.5));
  endfunction

  // ---------------- mechanism counters ----------------
  int n_wait_idle, n_ignored, n_update, n_colload, n_swap, n_tanh, n_tanh_sat, n_ysat;
  state_t prev_state;
  always @(posedge clk) begin
    if (rst_n) begin
      if (state == S_WAIT && !y_rdy) n_wait_idle++;
      if (!ready && y_rdy) n_ignored++;
      if (ready && y_rdy) n_update++;
      if ((state == S_LOADB1 || state == S_LOAD1) && prev_state != state) n_colload++;
      if (state == S_LOAD2 && prev_state == S_TANH) n_swap++;
      if (state == S_TANH) n_tanh++;
      if (state == S_TANH && tanh_sat) n_tanh_sat++;
      if (y_valid && y_sat) n_ysat++;
      prev_state <= state;
    end
  end

  initial begin
    longint s;
    int edges;
    rst_n = 0; y_rdy = 0; y_in = 0;
    n_hsat = 0;
    for (int j = 0; j < TAPS; j++) hist[j] = 0;
    load_params();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < SAMPLES; t++) begin
      repeat (t % 4) @(posedge clk);   // irregular gaps between samples
      #1;
      s = stimulus(t);
      y_in = data_t'(s);
      y_rdy = 1;
      while (!ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;               // sample taken at this edge
      edges = 0;
      model_step(s);
      y_rdy = (t % 10 == 5);            // sometimes keep offering while busy
      y_in = 10'($urandom);
      while (!y_valid) begin
        @(posedge clk); #1;
        edges++;
        if (edges == 30) y_rdy = 0;
      end
      y_rdy = 0;
      checks++;
      if (edges != 108) begin
        failures++;
        $display("sample %0d: result after %0d edges, expected 108", t, edges);
      end
      checks++;
      if (longint'(y_full) != exp_full || longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("sample %0d: y_full %0d expected %0d, y %0d expected %0d", t, y_full, exp_full, y, exp_y);
      end
    end
    $display("mechanisms: idle-wait=%0d ignored-while-busy=%0d updates=%0d column-loads=%0d layer-swaps=%0d tanh-lookups=%0d tanh-saturated=%0d (model %0d) output-clipped=%0d",
             n_wait_idle, n_ignored, n_update, n_colload, n_swap, n_tanh, n_tanh_sat, n_hsat, n_ysat);
    checks++;
    if (n_wait_idle == 0 || n_ignored == 0 || n_update != SAMPLES || n_colload != SAMPLES * TAPS ||
        n_swap != SAMPLES || n_tanh != SAMPLES * N || n_tanh_sat == 0 || n_tanh_sat != n_hsat) begin
      failures++;
      $display("a mechanism was not exercised as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
