// Self-checking testbench for bit_interchange.
// Exhaustively checks widths 3, 4, 7 and 8 (swap on selection bit = 1) and
// width 3 with the opposite polarity against hand-written expected bit
// arrangements (index 0 = bit 1).
module tb_bit_interchange;
  int checks = 0, failures = 0;

  logic [2:0] a3, y3, y3n;
  logic [3:0] a4, y4;
  logic [6:0] a7, y7;
  logic [7:0] a8, y8;

  bit_interchange #(.N(3))                  u3  (.ff(a3), .tv(y3));
  bit_interchange #(.N(3), .SWAP_ON(1'b0))  u3n (.ff(a3), .tv(y3n));
  bit_interchange #(.N(4))                  u4  (.ff(a4), .tv(y4));
  bit_interchange #(.N(7))                  u7  (.ff(a7), .tv(y7));
  bit_interchange #(.N(8))                  u8  (.ff(a8), .tv(y8));

  task automatic cmp(input logic [7:0] got, input logic [7:0] exp, input string w, input int v);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%0h got=%0h exp=%0h", w, v, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      a3 = v[2:0]; a4 = v[3:0]; a7 = v[6:0]; a8 = v[7:0];
      #1;
      cmp(8'(y3),  8'(a3[2] ? {a3[2], a3[0], a3[1]} : a3), "N=3", v);
      cmp(8'(y3n), 8'(!a3[2] ? {a3[2], a3[0], a3[1]} : a3), "N=3 swap-on-0", v);
      cmp(8'(y4),  8'(a4[3] ? {a4[3], a4[2], a4[0], a4[1]} : a4), "N=4", v);
      cmp(8'(y7),  8'(a7[6] ? {a7[6], a7[4], a7[5], a7[2], a7[3], a7[0], a7[1]} : a7), "N=7", v);
      cmp(y8,      a8[7] ? {a8[7], a8[6], a8[4], a8[5], a8[2], a8[3], a8[0], a8[1]} : a8, "N=8", v);
    end
    // The worked 3-bit example: 011 -> 101 and 101 -> 011 (printed as bit1 bit2 bit3).
    a3 = 3'b110; #1; cmp(8'(y3), 8'(3'b101), "example 011", 0);
    a3 = 3'b101; #1; cmp(8'(y3), 8'(3'b110), "example 101", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
