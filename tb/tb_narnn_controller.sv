// tb_narnn_controller: self-checking test of the sequencing FSM.
// Runs several inferences with idle gaps and with y_rdy also raised while
// busy, and checks cycle by cycle:
//  - y_valid comes 108 clock edges after the accepting edge, of which 107
//    cycles are processing states (5+1 per column for 16 columns, 5 tanh,
//    5 output-weight loads, 1 output-layer latch);
//  - the ROM word written into the cache is each time the next of the 85
//    words in order, to cache entry (count mod 5), with the bias enable on
//    words 0..4 and 80;
//  - every hidden product of PE k is latched one cycle after entry k was
//    written, with tap_sel equal to the column, and accumulated one cycle
//    later, the first one with the bias;
//  - the tanh table reads PE 0..4 in order, each after its last
//    accumulation; every PE latches one output-layer product;
//  - a measurement is taken only in S_WAIT.
module tb_narnn_controller;
  import narnn_pkg::*;
  localparam int N = 5, TAPS = 16, DEPTH = 85;
  logic clk, rst_n, y_rdy, ready;
  state_t state;
  logic [6:0] rom_addr;
  logic cache_we, cache_b_we;
  logic [2:0] cache_idx;
  logic tap_update;
  logic [3:0] tap_sel;
  logic pe_clr, pe_b_load, layer_sel, tanh_we, out_en, y_valid;
  logic [N-1:0] pe_mul_en, pe_acc_en;
  logic [2:0] tanh_sel;
  int checks = 0, failures = 0;

  narnn_controller dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%t: %s", $time, what);
    end
  endtask

  // Per-inference bookkeeping, sampled just before each rising edge.
  int busy_cycles, edges_since_accept, words, tanh_reads, l2_muls;
  int muls [N], accs [N], biased [N];
  int last_write [N];     // cycle of the last cache write per entry
  int last_mul [N];       // cycle of the last hidden product per PE
  logic [6:0] rom_q_addr; // address of the word currently on the ROM output
  int cyc, ignored, accepted;
  bit running;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (running) edges_since_accept++;
      if (y_rdy && !ready) ignored++;
      check(tap_update == (ready && y_rdy), "tap_update outside S_WAIT");
      if (state != S_WAIT && state != S_OUT) busy_cycles++;
      if (cache_we) begin
        check(rom_q_addr == 7'(words), $sformatf("ROM word %0d where %0d expected", rom_q_addr, words));
        check(cache_idx == 3'(words % N), "cache index");
        check(cache_b_we == (words < N || words == TAPS * N), "bias write enable");
        last_write[cache_idx] = cyc;
        words++;
      end
      for (int k = 0; k < N; k++) begin
        if (pe_mul_en[k] && state != S_L2) begin
          check(last_write[k] == cyc - 1, $sformatf("PE %0d product not right after its weight", k));
          check(tap_sel == 4'(muls[k]), $sformatf("PE %0d column %0d with tap %0d", k, muls[k], tap_sel));
          check(!layer_sel, "layer_sel in hidden layer");
          last_mul[k] = cyc;
          muls[k]++;
        end
        if (pe_mul_en[k] && state == S_L2) begin
          check(layer_sel, "layer_sel in output layer");
          check(tanh_reads == N, "output product before all tanh values");
          l2_muls++;
        end
        if (pe_acc_en[k]) begin
          check(last_mul[k] == cyc - 1, $sformatf("PE %0d accumulate not right after product", k));
          if (pe_b_load) biased[k]++;
          check(pe_b_load == (accs[k] == 0), "bias with first column only");
          accs[k]++;
        end
      end
      if (tanh_we) begin
        check(tanh_sel == 3'(tanh_reads), "tanh order");
        check(accs[tanh_sel] == TAPS && !pe_acc_en[tanh_sel], "tanh read before last accumulation");
        tanh_reads++;
      end
      if (pe_clr) begin
        check(ready, "clear outside S_WAIT");
      end
      if (ready && y_rdy) begin
        running = 1;
        edges_since_accept = 0;
        busy_cycles = 0; words = 0; tanh_reads = 0; l2_muls = 0;
        for (int k = 0; k < N; k++) begin muls[k] = 0; accs[k] = 0; biased[k] = 0; end
        accepted++;
      end
      rom_q_addr <= rom_addr;
      #1;
      if (y_valid) begin
        check(edges_since_accept == 108, $sformatf("result after %0d edges", edges_since_accept));
        check(busy_cycles == 107, $sformatf("%0d processing cycles", busy_cycles));
        check(words == DEPTH, "not all ROM words loaded");
        check(l2_muls == N, "output-layer products");
        for (int k = 0; k < N; k++)
          check(muls[k] == TAPS && accs[k] == TAPS && biased[k] == 1, $sformatf("PE %0d counts", k));
        running = 0;
      end
    end
  end

  initial begin
    rst_n = 0; y_rdy = 0; cyc = 0; ignored = 0; accepted = 0; running = 0;
    for (int k = 0; k < N; k++) begin last_write[k] = -10; last_mul[k] = -10; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int inf = 0; inf < 6; inf++) begin
      repeat (inf) @(posedge clk);  // idle gap of varying length
      #1 y_rdy = 1;
      @(posedge clk); #1;
      // keep y_rdy high for a while on odd inferences: must be ignored
      y_rdy = (inf % 2 == 1);
      repeat (20) @(posedge clk);
      #1 y_rdy = 0;
      while (!y_valid) @(posedge clk);
      #2;
    end
    check(accepted == 6, $sformatf("%0d measurements taken", accepted));
    check(ignored > 0, "y_rdy while busy never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
