// Self-checking testbench for switching_unit.
// Drives random data and checks that q follows d at every rising clock edge
// exactly like a plain flip-flop, that the internal gated clock pulses only in
// cycles where d differed from q, and that reset acts without a clock.
module tb_switching_unit;
  logic clk = 0, rst_n = 1, d = 0, q;
  int checks = 0, failures = 0;
  int cycles = 0, pulses = 0, expected_pulses = 0;
  logic q_model;

  switching_unit #(.RESET_VAL(1'b1)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge dut.gclk) pulses++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++; if (q !== 1'b1) begin failures++; $display("FAIL reset value %b", q); end
    @(negedge clk); rst_n = 1;
    pulses = 0;   // edges while held in reset are not counted
    q_model = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d = (i < 200) ? 1'($urandom) : (i % 17 == 0);   // random, then long runs
      if (d != q_model) expected_pulses++;
      q_model = d;
      @(posedge clk); #1;
      cycles++;
      checks++;
      if (q !== q_model) begin failures++; $display("FAIL cycle %0d q=%b exp=%b", i, q, q_model); end
    end
    checks++;
    if (pulses != expected_pulses) begin
      failures++; $display("FAIL gated pulses %0d expected %0d", pulses, expected_pulses);
    end
    checks++;
    if (pulses >= cycles) begin failures++; $display("FAIL no clock edges were saved"); end
    $display("clock edges: %0d cycles, %0d delivered to the flip-flop", cycles, pulses);
    // Asynchronous reset in the middle of a low clock phase.
    @(negedge clk); d = 0; #1; rst_n = 0; #1;
    checks++; if (q !== 1'b1) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
