// Maximal-length LFSR built from gated-clock switching units.
//
// An N-bit external-XOR (Fibonacci) shift register: every clock, stage 1 takes
// the XOR of the stages selected by TAPS and stage k+1 takes stage k. Each
// stage is a switching_unit, so its flip-flop is clocked only when its value
// really changes; stages whose next value equals the present one (a run of
// equal bits shifting through, or the whole register while en is low) get no
// clock edge. The state sequence is that of an ordinary LFSR with the same
// taps: the gating changes power, not behaviour.
//
// Interface: q[0] is FF1 (the stage fed back into), q[N-1] is FF(n) (the
// serial output and the bit interchanger's selection bit). load (priority)
// copies seed into the register on the next clock; en advances one state per
// clock; with both low the register holds. rst_n asynchronously loads SEED.
// The shift direction and external-XOR form follow the worked 3-bit example;
// the default taps, the seed port, the enable and the reset are this design's
// choices. Seeds must be non-zero (the all-zero state locks up, as in any
// XOR LFSR).
module mclk_lfsr #(
  parameter int unsigned N    = 8,
  parameter logic [N-1:0] TAPS = N'(mlfsr_pkg::max_taps(N)),
  parameter logic [N-1:0] SEED = N'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] seed,
  output logic [N-1:0] q
);

  logic         feedback;
  logic [N-1:0] nxt;
  logic [N-1:0] d;

  assign feedback = ^(q & TAPS);
  assign nxt      = {q[N-2:0], feedback};

  always_comb begin
    if (load)    d = seed;
    else if (en) d = nxt;
    else         d = q;
  end

  for (genvar k = 0; k < N; k++) begin : g_stage
    switching_unit #(
      .RESET_VAL (SEED[k])
    ) u_unit (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (d[k]),
      .q     (q[k])
    );
  end

  // The register needs at least two stages and a tap on the last one.
  initial begin
    assert (N >= 2) else $error("mclk_lfsr: N must be at least 2");
    assert (TAPS[N-1]) else $error("mclk_lfsr: TAPS must include stage N");
  end

endmodule
