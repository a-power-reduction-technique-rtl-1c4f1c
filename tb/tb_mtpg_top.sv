// End-to-end testbench for mtpg_top at its default size (8 bits).
// Generates one complete test set of 255 vectors and checks every reordered
// vector and the serial output against a reference model (shift register with
// x^8+x^6+x^5+x^4+1, then bit pairs (1,2),(3,4),(5,6) exchanged when bit 8 is
// 1). It also checks that all 255 non-zero patterns appear exactly once, that
// the run takes 255 enabled clocks, and that the total Hamming distance of the
// reordered sequence from seed 0..01 is 830 against 1022 for the raw LFSR
// sequence (values worked out separately). Each mechanism is counted and must
// occur: clock gating of a flip-flop, a swapping cycle, a straight cycle, a
// hold with en low and a seed load.
module tb_mtpg_top;
  localparam int N = 8;
  logic clk = 0, rst_n = 1, en = 0, load = 0;
  logic [N-1:0] seed = '0, tv, lfsr_q;
  logic serial_out;
  int checks = 0, failures = 0;
  int n_gated = 0, n_swap = 0, n_straight = 0, n_hold = 0, n_load = 0;
  int ff_clk_edges = 0;

  mtpg_top dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .seed(seed),
                .tv(tv), .lfsr_q(lfsr_q), .serial_out(serial_out));

  always #5 clk = ~clk;

  for (genvar k = 0; k < N; k++) begin : g_cnt
    always @(posedge dut.u_lfsr.g_stage[k].u_unit.gclk) ff_clk_edges++;
  end

  function automatic logic [7:0] ref_next(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  function automatic logic [7:0] ref_tv(input logic [7:0] s);
    return s[7] ? {s[7], s[6], s[4], s[5], s[2], s[3], s[0], s[1]} : s;
  endfunction
  function automatic int hd(input logic [7:0] a, input logic [7:0] b);
    return $countones(a ^ b);
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
    logic [7:0] m, prev_tv, prev_q;
    bit seen [256];
    int thd_raw, thd_ord, cycles, edges_before;

    #1 rst_n = 0;
    #1;
    chk(lfsr_q == 8'h01, "reset seed");
    @(negedge clk); rst_n = 1;

    // Seed load, then one complete test set.
    seed = 8'h01; load = 1;
    @(negedge clk); load = 0; n_load++;
    chk(lfsr_q == 8'h01, "seed loaded");
    m = 8'h01; thd_raw = 0; thd_ord = 0; cycles = 0;
    edges_before = ff_clk_edges;
    en = 1;
    for (int i = 0; i < 255; i++) begin
      chk(tv == ref_tv(m), $sformatf("vector %0d: tv %02h expected %02h", i, tv, ref_tv(m)));
      chk(serial_out == m[7], "serial output is FF(n)");
      chk(!seen[tv] && tv != 0, $sformatf("vector %02h repeated or zero", tv));
      seen[tv] = 1;
      if (lfsr_q[7]) n_swap++; else n_straight++;
      if (i > 0) begin
        thd_raw += hd(prev_q, lfsr_q);
        thd_ord += hd(prev_tv, tv);
      end
      prev_q = lfsr_q; prev_tv = tv;
      @(negedge clk);
      cycles++;
      m = ref_next(m);
    end
    chk(lfsr_q == 8'h01 && cycles == 255, "full set in 255 clocks, back at seed");
    chk(thd_raw == 1022, $sformatf("raw THD %0d, expected 1022", thd_raw));
    chk(thd_ord == 830, $sformatf("reordered THD %0d, expected 830", thd_ord));
    n_gated = N * cycles - (ff_clk_edges - edges_before);
    // Every flip-flop clock edge is a value change, so edges equal the raw THD
    // plus the wrap-around step back to the seed.
    chk(ff_clk_edges - edges_before == thd_raw + hd(prev_q, 8'h01), "clock edges equal bit changes");
    $display("THD raw=%0d reordered=%0d; flip-flop clock edges %0d of %0d",
             thd_raw, thd_ord, ff_clk_edges - edges_before, N * cycles);

    // Hold.
    en = 0;
    edges_before = ff_clk_edges;
    m = lfsr_q;
    repeat (5) begin @(negedge clk); n_hold++; end
    chk(lfsr_q == m && ff_clk_edges == edges_before, "hold: no change, no clock edges");

    // Reload mid-stream.
    seed = 8'h5A; load = 1; en = 1;
    @(negedge clk); load = 0; n_load++;
    chk(lfsr_q == 8'h5A && tv == ref_tv(8'h5A), "reload");

    chk(n_gated > 0,    "mechanism: clock gating");
    chk(n_swap > 0,     "mechanism: bit interchange");
    chk(n_straight > 0, "mechanism: straight pass");
    chk(n_hold > 0,     "mechanism: hold");
    chk(n_load > 0,     "mechanism: seed load");
    $display("mechanisms: gated_edges=%0d swap=%0d straight=%0d hold=%0d load=%0d",
             n_gated, n_swap, n_straight, n_hold, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
