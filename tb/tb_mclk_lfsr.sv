// Self-checking testbench for mclk_lfsr.
// An 8-bit and a 3-bit instance are run against a reference shift-register
// model written from the polynomials x^8+x^6+x^5+x^4+1 and x^3+x^2+1. Checks:
// every state, the period 2^N-1 with all states distinct, the worked 3-bit
// sequence 011,001,100,010,101,110,111, seed load, hold with en low (no
// flip-flop clocked), and that each stage's gated clock pulsed exactly when
// that stage changed value.
module tb_mclk_lfsr;
  logic clk = 0, rst_n = 1, en = 0, load = 0;
  logic [7:0] seed8 = '0, q8;
  logic [2:0] seed3 = '0, q3;
  int checks = 0, failures = 0;
  int pulses8 [8];
  int toggles8 [8];

  mclk_lfsr #(.N(8)) dut8 (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .seed(seed8), .q(q8));
  mclk_lfsr #(.N(3)) dut3 (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .seed(seed3), .q(q3));

  always #5 clk = ~clk;

  for (genvar k = 0; k < 8; k++) begin : g_cnt
    always @(posedge dut8.g_stage[k].u_unit.gclk) pulses8[k]++;
    always @(q8[k]) if (rst_n) toggles8[k]++;
  end

  // Reference: bit 0 = stage 1; stage 1 <= XOR of the tapped stages.
  function automatic logic [7:0] ref8(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  function automatic logic [2:0] ref3(input logic [2:0] s);
    return {s[1:0], s[2] ^ s[1]};
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m8;
    logic [2:0] m3;
    bit seen [256];
    // Worked example, printed as stage1 stage2 stage3.
    static logic [2:0] ex [7] = '{3'b011, 3'b001, 3'b100, 3'b010, 3'b101, 3'b110, 3'b111};
    int n_total_pulses, n_cycles;

    #1 rst_n = 0;
    #1;
    chk(q8 == 8'h01 && q3 == 3'h1, "reset to default seed");
    foreach (pulses8[k]) begin pulses8[k] = 0; toggles8[k] = 0; end
    @(negedge clk); rst_n = 1;

    // Load seeds: 8-bit 0x01, 3-bit 011 (stage1=0, stage2=1, stage3=1).
    load = 1; seed8 = 8'h01; seed3 = 3'b110;
    @(negedge clk); load = 0;
    chk(q3 == 3'b110 && q8 == 8'h01, "seed load");

    m8 = q8; m3 = q3;
    en = 1;
    n_cycles = 0;
    foreach (pulses8[k]) begin pulses8[k] = 0; toggles8[k] = 0; end
    for (int i = 0; i < 255; i++) begin
      chk(!seen[m8], $sformatf("state %02h repeated before period end", m8));
      seen[m8] = 1;
      if (i < 7) chk({q3[0], q3[1], q3[2]} == ex[i], $sformatf("3-bit example vector V%0d", i + 1));
      @(negedge clk);
      n_cycles++;
      m8 = ref8(m8); m3 = ref3(m3);
      chk(q8 == m8, $sformatf("8-bit state %0d: got %02h exp %02h", i, q8, m8));
      chk(q3 == m3, $sformatf("3-bit state %0d", i));
    end
    chk(q8 == 8'h01, "8-bit period is 255");
    n_total_pulses = 0;
    foreach (pulses8[k]) begin
      chk(pulses8[k] == toggles8[k],
          $sformatf("stage %0d: %0d clock pulses for %0d value changes", k + 1, pulses8[k], toggles8[k]));
      n_total_pulses += pulses8[k];
    end
    chk(n_total_pulses < 8 * n_cycles, "gating saved clock edges");
    $display("8-bit: %0d enabled cycles, %0d of %0d flip-flop clock edges delivered",
             n_cycles, n_total_pulses, 8 * n_cycles);

    // Hold: en low, nothing clocked.
    en = 0;
    foreach (pulses8[k]) pulses8[k] = 0;
    m8 = q8;
    repeat (10) @(negedge clk);
    chk(q8 == m8, "hold with en low");
    n_total_pulses = 0;
    foreach (pulses8[k]) n_total_pulses += pulses8[k];
    chk(n_total_pulses == 0, "no clock edges while holding");

    // Load a new seed mid-run.
    en = 1; load = 1; seed8 = 8'hA5;
    @(negedge clk); load = 0;
    chk(q8 == 8'hA5, "reload seed");
    @(negedge clk);
    chk(q8 == ref8(8'hA5), "step after reload");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
