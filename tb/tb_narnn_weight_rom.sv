// tb_narnn_weight_rom: self-checking test of the parameter ROM.
// Reads the parameter file independently with $fscanf, then reads every
// address of the ROM (in order, then at random) and checks that each word
// appears exactly one clock after its address, and not before.
module tb_narnn_weight_rom;
  import narnn_pkg::*;
  localparam int DEPTH = 85;
  logic clk;
  logic [6:0] addr;
  rom_word_t rdata;
  logic [19:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  narnn_weight_rom dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fd, n;
    logic [6:0] prev;
    fd = $fopen("rtl/narnn_weights.hex", "r");
    if (fd == 0) begin
      $display("cannot open parameter file");
      failures++;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        n = $fscanf(fd, "%h", ref_mem[i]);
        if (n != 1) failures++;
      end
      $fclose(fd);
    end
    addr = 0;
    @(posedge clk); #1;
    for (int it = 0; it < 2000; it++) begin
      prev = addr;
      addr = (it < DEPTH) ? 7'(it) : 7'($urandom_range(0, DEPTH - 1));
      #1;
      // before the edge rdata still shows the word of the previous address
      checks++;
      if (rdata !== ref_mem[prev]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h expected %h (early)", prev, rdata, ref_mem[prev]);
      end
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h expected %h", addr, rdata, ref_mem[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
