// Shared constants for the low-power test pattern generator.
//
// max_taps(n) returns the feedback tap mask of a maximal-length external-XOR
// (Fibonacci) LFSR of n bits, n = 2..16. Bit k-1 of the mask set means stage k
// is XORed into the new value of stage 1. The polynomials are a standard
// maximal-length table (for example x^8+x^6+x^5+x^4+1 for n = 8); they are this
// design's choice, as the tap sequence of the generator is left open. Each mask
// was checked to give period 2^n-1 under the shift convention of mclk_lfsr.
// For n = 3 the mask gives stage1 <= stage2 ^ stage3, the sequence of the
// worked 3-bit example (011, 001, 100, 010, 101, 110, 111).
// A return value of 0 means "no entry": the caller must supply its own taps.
package mlfsr_pkg;

  localparam int unsigned MAX_N = 32;

  function automatic logic [MAX_N-1:0] max_taps(input int unsigned n);
    case (n)
      2:       return 32'h0000_0003;  // x^2+x+1
      3:       return 32'h0000_0006;  // x^3+x^2+1
      4:       return 32'h0000_000C;  // x^4+x^3+1
      5:       return 32'h0000_0014;  // x^5+x^3+1
      6:       return 32'h0000_0030;  // x^6+x^5+1
      7:       return 32'h0000_0060;  // x^7+x^6+1
      8:       return 32'h0000_00B8;  // x^8+x^6+x^5+x^4+1
      9:       return 32'h0000_0110;  // x^9+x^5+1
      10:      return 32'h0000_0240;  // x^10+x^7+1
      11:      return 32'h0000_0500;  // x^11+x^9+1
      12:      return 32'h0000_0829;  // x^12+x^6+x^4+x+1
      13:      return 32'h0000_100D;  // x^13+x^4+x^3+x+1
      14:      return 32'h0000_2015;  // x^14+x^5+x^3+x+1
      15:      return 32'h0000_6000;  // x^15+x^14+1
      16:      return 32'h0000_D008;  // x^16+x^15+x^13+x^4+1
      default: return '0;
    endcase
  endfunction

endpackage
