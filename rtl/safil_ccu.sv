// safil_ccu: congestion control unit.
//
// Watches the almost-full flag of every PE (NUM_FIFO = 64, one OR-ed flag
// per PE) and decides how many of the NUM_SU = 16 selector units may take
// new addresses: additive increase, multiplicative decrease. In any cycle
// in which at least one flag is high the number of active units is halved
// (rounded down); in a cycle with no flag high it grows by one, up to
// NUM_SU. After reset all units are active.
//
// su_control has one bit per selector unit (bit i enables unit i) and
// always enables the n highest-numbered units, so 16 active units read
// FFFF, 8 read FF00 and 3 read E000, as in the document's CCU waveform.
// Timing: a flag seen at the end of cycle k changes su_control in cycle
// k+1. The policy and the mask pattern are the document's; rounding n/2
// down (so one active unit can drop to none) is this design's reading.
module safil_ccu #(
  parameter int unsigned NUM_FIFO = 64,
  parameter int unsigned NUM_SU   = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NUM_FIFO-1:0] fifo_full,
  output logic [NUM_SU-1:0] su_control
);
  localparam int unsigned CW = $clog2(NUM_SU + 1);

  logic [CW-1:0] active;

  always_ff @(posedge clk) begin
    if (rst)                active <= CW'(NUM_SU);
    else if (|fifo_full)    active <= active >> 1;
    else if (active < CW'(NUM_SU)) active <= active + 1'b1;
  end

  always_comb begin
    for (int i = 0; i < NUM_SU; i++)
      su_control[i] = (i >= NUM_SU - int'(active));
  end
endmodule
