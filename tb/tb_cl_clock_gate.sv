// Self-checking testbench for cl_clock_gate.
// Applies the four data_in/data_out rows of the gating truth table with the
// clock high and checks the gated clock; then changes the data while the clock
// is high and checks that the gate neither opens nor closes mid-pulse; also
// checks that the gated clock is 0 whenever the clock is low.
module tb_cl_clock_gate;
  logic clk, din, dout, gclk;
  int checks = 0, failures = 0;

  cl_clock_gate dut (.clk(clk), .data_in(din), .data_out(dout), .gclk(gclk));

  task automatic check(input logic exp, input string what);
    checks++;
    if (gclk !== exp) begin
      failures++;
      $display("FAIL %s: din=%b dout=%b clk=%b gclk=%b exp=%b", what, din, dout, clk, gclk, exp);
    end
  endtask

  // Watchdog: the whole test takes well under 1000 time units.
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; din = 0; dout = 0;
    #5;
    for (int r = 0; r < 4; r++) begin
      logic a, b, expct;
      a = r[1]; b = r[0];
      expct = a ^ b;                       // modified clock is 1 only when bits differ
      clk = 0; din = a; dout = b; #5;
      check(1'b0, "clock low");
      clk = 1; #5;
      check(expct, "truth table row");
      // Data changes while the clock is high must not affect this pulse.
      din = ~a; #2;
      check(expct, "hold after din change");
      dout = ~b; #2;
      check(expct, "hold after dout change");
      din = a; #2;
      check(expct, "hold after second din change");
      clk = 0; #5;
      check(1'b0, "clock low again");
    end
    // Repeated clocks with constant equal data: no pulse at all.
    din = 1; dout = 1;
    for (int i = 0; i < 3; i++) begin
      clk = 0; #5; clk = 1; #5; check(1'b0, "idle stays gated"); clk = 0; #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
