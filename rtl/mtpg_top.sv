// Low-power test pattern generator (TPG) for built-in self test.
//
// Two power-saving mechanisms are stacked. Inside the generator, every LFSR
// flip-flop has its own clock gate that suppresses the clock edge whenever the
// flip-flop would reload the value it already holds (mclk_lfsr). At the
// output, a row of multiplexers controlled by the last LFSR bit swaps
// neighbouring bit pairs (bit_interchange), which reorders the 2^N-1 patterns
// so that consecutive patterns differ in fewer bits and shifting them into a
// scan chain toggles less.
//
// Interface: tv is the reordered N-bit test vector (bit 0 = position 1),
// lfsr_q the raw LFSR state and serial_out the last LFSR stage FF(n).
// load copies seed into the LFSR, en steps it once per clock, rst_n resets it
// asynchronously to the seed 0..01. tv is combinational from the LFSR
// flip-flops, so a new vector is valid one clock after each enabled edge; a
// full run of all 2^N-1 vectors takes 2^N-1 enabled clocks. The circuit under
// test and its scan chain are outside this module.
module mtpg_top #(
  parameter int unsigned N       = 8,
  parameter logic        SWAP_ON = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] seed,
  output logic [N-1:0] tv,
  output logic [N-1:0] lfsr_q,
  output logic         serial_out
);

  mclk_lfsr #(
    .N (N)
  ) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .load  (load),
    .seed  (seed),
    .q     (lfsr_q)
  );

  bit_interchange #(
    .N       (N),
    .SWAP_ON (SWAP_ON)
  ) u_bim (
    .ff (lfsr_q),
    .tv (tv)
  );

  assign serial_out = lfsr_q[N-1];

endmodule
