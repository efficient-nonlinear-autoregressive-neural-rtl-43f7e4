// narnn_weight_rom: read-only store of the trained network parameters.
//
// Each word carries a weight field and a bias field, read together, so that
// a hidden bias can be loaded into the weight cache in the same cycle as the
// first weight column (the published block diagram labels the ROM output
// "w, b"). Word layout for N_PE neurons and N_TAP taps:
//   word j*N_PE + k       (j = tap 0..N_TAP-1, k = neuron 0..N_PE-1):
//                         w = hidden weight w[k][j]; b = hidden bias b[k]
//                         when j == 0, otherwise 0
//   word N_TAP*N_PE + k   w = output weight wo[k]; b = output bias when
//                         k == 0, otherwise 0
// For 5 neurons and 16 taps this is 85 words holding the 91 parameters.
//
// Timing: synchronous read. rdata shows the word at addr one clock after
// addr is presented. The array is filled from a hex file of 20-bit words
// ({w, b}, 5 hex digits per line) named by INIT_FILE; a device would hold a
// user's parameters in a non-volatile memory of this shape. Reading a file
// and the one-cycle read latency are this design's choices. Synthesis front
// ends that ignore $readmemh produce an empty ROM; there the module stands
// for the memory macro that would replace it.
module narnn_weight_rom
  import narnn_pkg::*;
#(
  parameter int unsigned DEPTH     = N_TAP * N_PE + N_PE,
  parameter string       INIT_FILE = "rtl/narnn_weights.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output rom_word_t                rdata
);

  rom_word_t mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) rdata <= mem[addr];

endmodule
