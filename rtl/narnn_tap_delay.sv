// narnn_tap_delay: the network's internal delay states.
//
// A shift register of N_TAP past measurements. When update is high the new
// measurement y_in enters at tap 0 and every older value moves one tap on
// (tap j then holds Y(t-j) counted from the newest sample); the oldest value
// is dropped. sel picks the tap given to all PEs as operand x, one column per
// tap during the hidden layer. The update happens at the clock edge on which
// the controller accepts a new measurement; x follows sel combinationally.
// Reset fills all taps with zero, so the first N_TAP predictions after reset
// see zeros for samples not yet received (this design's choice; the document
// does not say how the states start).
module narnn_tap_delay
  import narnn_pkg::*;
#(
  parameter int unsigned TAPS = N_TAP,
  parameter int unsigned DW   = DATA_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        update,
  input  logic signed [DW-1:0]        y_in,
  input  logic [$clog2(TAPS)-1:0]     sel,
  output logic signed [DW-1:0]        x
);

  logic signed [DW-1:0] taps [TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
    end else if (update) begin
      taps[0] <= y_in;
      for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
    end
  end

  assign x = taps[sel];

endmodule
