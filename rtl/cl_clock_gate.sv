// Control logic (CL) of one LFSR switching unit: a data-driven clock gate.
//
// The flip-flop it serves only needs a clock edge when its next value differs
// from its present one. The gate therefore forms data_in XOR data_out and lets
// the clock through only while that difference is 1:
//
//   clk  data_in  data_out | gclk
//    1      1        0     |  1
//    1      0        1     |  1
//    1      1        1     |  0
//    1      0        0     |  0
//    0      -        -     |  0
//
// This truth table is the technique's definition of the control logic; how it
// is realised is this design's choice. A bare XOR-and-clock gate is unsafe here: right after the edge the
// flip-flop's Q (data_out) and its upstream neighbour (data_in) both change
// while the clock is still high, which could reopen the gate and clock the
// flip-flop twice in one cycle. The XOR result is therefore captured by a latch
// that is transparent while clk is low and holds while clk is high, and the
// latched enable is ANDed with clk (the usual latch-based clock-gating cell).
// The latch is intended; it is the reason for the latch warning on this module.
//
// Timing: data_in/data_out must be settled before the rising edge of clk;
// gclk then follows clk for that whole high phase, or stays 0.
module cl_clock_gate (
  input  logic clk,
  input  logic data_in,
  input  logic data_out,
  output logic gclk
);

  logic differ;
  logic en_latched;

  assign differ = data_in ^ data_out;

  // Transparent while the clock is low, closed while it is high.
  always_latch begin
    if (!clk) en_latched = differ;
  end

  assign gclk = clk & en_latched;

endmodule
