// narnn_pkg: types and constants shared by the NARNN accelerator.
//
// Number format: every stored value (measurement, delay state, weight, bias,
// tanh result) is a signed 10-bit two's-complement fixed-point number with
// 8 fraction bits, i.e. range [-2, 1.99609375] in steps of 1/256. This is the
// format the design was evaluated with. A product of two such numbers is a
// 20-bit value with 16 fraction bits; the PE accumulator keeps one extra bit
// for overflow (21 bits). The network size (5 hidden neurons, 16 delay taps)
// is the design's main configuration. The controller state names follow the
// published state diagram; their encoding is this design's own.
package narnn_pkg;

  localparam int unsigned DATA_W = 10;             // stored value width
  localparam int unsigned FRAC_W = 8;              // fraction bits of stored values
  localparam int unsigned PROD_W = 2 * DATA_W;     // product register width
  localparam int unsigned ACC_W  = 2 * DATA_W + 1; // PE accumulator: product + overflow bit
  localparam int unsigned N_PE   = 5;              // hidden neurons = processing elements
  localparam int unsigned N_TAP  = 16;             // delay states d

  typedef logic signed [DATA_W-1:0] data_t;

  // One word of the parameter ROM: a weight and a bias field, read together.
  typedef struct packed {
    data_t w;
    data_t b;
  } rom_word_t;

  typedef enum logic [2:0] {
    S_WAIT   = 3'd0,  // idle until a new measurement arrives
    S_LOADB1 = 3'd1,  // load first weight column and the hidden biases
    S_L1     = 3'd2,  // latch hidden-layer products for one column
    S_LOAD1  = 3'd3,  // load next weight column
    S_TANH   = 3'd4,  // apply tanh to each PE result through the shared LUT
    S_LOAD2  = 3'd5,  // load output-layer weights and output bias
    S_L2     = 3'd6,  // latch output-layer products
    S_OUT    = 3'd7   // form the prediction
  } state_t;

endpackage
