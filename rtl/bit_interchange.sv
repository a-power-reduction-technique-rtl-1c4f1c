// Bit interchanging module: reorders the LFSR's test vectors by swapping
// neighbouring bits.
//
// Bit n of the LFSR (ff[N-1]) is the selection line of a row of two-input
// multiplexers. When it equals SWAP_ON, bit 1 is exchanged with bit 2, bit 3
// with bit 4, and so on; otherwise every bit passes unchanged. For odd N the
// pairs are (1,2) .. (N-2,N-1); for even N they stop at (N-3,N-2), so bits N-1
// and N always pass straight through and the selection bit is never moved.
// Because the swap is a function of the vector alone, the generator still
// produces 2^N-1 distinct patterns; only their bit arrangement, and with it the
// order in which patterns appear, changes. With N = 3 and SWAP_ON = 1 the
// sequence 011,001,100,010,101,110,111 becomes 101,001,100,010,011,110,111,
// lowering the total Hamming distance between consecutive vectors from 11 to 9.
//
// SWAP_ON = 1 follows the worked 3-bit example; SWAP_ON = 0 gives the other
// polarity. Bit index 0 is FF1. Purely combinational.
module bit_interchange #(
  parameter int unsigned N       = 8,
  parameter logic        SWAP_ON = 1'b1
) (
  input  logic [N-1:0] ff,
  output logic [N-1:0] tv
);

  // Number of swapped pairs: floor((N-1)/2) covers both the odd and even rule.
  localparam int unsigned PAIRS = (N - 1) / 2;

  logic sel;
  assign sel = (ff[N-1] == SWAP_ON);

  always_comb begin
    tv = ff;
    for (int unsigned p = 0; p < PAIRS; p++) begin
      tv[2*p]   = sel ? ff[2*p+1] : ff[2*p];
      tv[2*p+1] = sel ? ff[2*p]   : ff[2*p+1];
    end
  end

endmodule
