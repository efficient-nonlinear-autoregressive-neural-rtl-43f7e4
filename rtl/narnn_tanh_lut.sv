// narnn_tanh_lut: the shared tanh activation, approximated by a lookup table,
// and the registers that keep each neuron's activation.
//
// One table serves all PEs in turn: when we is high, the accumulator value of
// PE sel is looked up and the result is stored in phi[sel] at the clock edge.
// The phi registers feed back to the PEs as the output-layer multiplicand.
//
// Table: tanh is odd, so only the positive half is stored. The input (a PE
// accumulator, ACC_W bits with IN_FRAC fraction bits) is reduced to its
// magnitude in steps of 2^-STEP_LOG2 (1/64 by default); entry i holds
// round(2^FRAC_W * tanh((i + 0.5) / 2^STEP_LOG2)), the value at the middle
// of the step, as an unsigned 9-bit number (0..256). The table is computed at
// elaboration by a constant function, so it becomes a constant ROM. Magnitudes beyond the table
// (|x| >= 4 by default, where tanh rounds to 1.0 at 8 fraction bits) use the
// last entry: the input saturates. The sign is then put back. The output is
// in the 10-bit Q2.8 data format. Table size, step and the midpoint rule are
// this design's choices; the document says only that a LUT approximates tanh.
module narnn_tanh_lut
  import narnn_pkg::*;
#(
  parameter int unsigned N         = N_PE,
  parameter int unsigned AW        = ACC_W,
  parameter int unsigned IN_FRAC   = 2 * FRAC_W,
  parameter int unsigned STEP_LOG2 = 6,
  parameter int unsigned ENTRIES   = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(N)-1:0]    sel,
  input  logic signed [AW-1:0]    acc_in [N],
  output logic signed [DATA_W-1:0] phi  [N],
  output logic                    sat        // current lookup is beyond the table
);

  localparam int unsigned SHIFT = IN_FRAC - STEP_LOG2;
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef logic [FRAC_W:0] table_t [ENTRIES];

  function automatic table_t make_table();
    table_t tab;
    real    mid;
    for (int i = 0; i < ENTRIES; i++) begin
      mid    = (real'(i) + 0.5) / real'(2 ** STEP_LOG2);
      tab[i] = (FRAC_W + 1)'(int'($floor($tanh(mid) * real'(2 ** FRAC_W) + 0.5)));
    end
    return tab;
  endfunction

  localparam table_t TABLE = make_table();

  logic signed [AW-1:0] a;
  logic                 neg;
  logic [AW-1:0]        mag;
  logic [AW-1:0]        step;
  logic [IDX_W-1:0]     idx;
  logic signed [DATA_W-1:0] t_pos;
  logic signed [DATA_W-1:0] result;

  always_comb begin
    a     = acc_in[sel];
    neg   = a[AW-1];
    // For the most negative input -a wraps to itself, which read unsigned is
    // still the right magnitude.
    mag   = neg ? AW'(-a) : AW'(a);
    step  = mag >> SHIFT;
    sat   = step >= AW'(ENTRIES);
    idx   = sat ? IDX_W'(ENTRIES - 1) : step[IDX_W-1:0];
    t_pos = DATA_W'(TABLE[idx]);
    result = neg ? -t_pos : t_pos;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) phi[i] <= '0;
    end else if (we) begin
      phi[sel] <= result;
    end
  end

endmodule
