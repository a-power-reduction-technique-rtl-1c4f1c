// Testbench helper: runs one mtpg_top of width N through a complete test set
// of 2^N-1 vectors from seed SEED_VAL and measures the scan-in cost metrics.
//
// The reference model steps a shift register whose stage 1 takes the XOR of the
// stages listed in REF_TAPS (bit k-1 = stage k) and exchanges bit pairs
// (1,2),(3,4),... when bit N is 1, for floor((N-1)/2) pairs. Every vector is
// compared with the reference. Measured: the total Hamming distance (THD) of
// consecutive raw LFSR states and of consecutive reordered vectors, and the
// weighted transition sum  sum_vectors sum_{i=1}^{N-1} (N-i)*(t_i xor t_{i+1})
// with bit 1 entering the scan chain first (average power = sum / vectors).
// The results are compared with EXP_* values worked out separately.
// Start with a pulse on start; done rises when the set is complete.
module tpg_workload_run #(
  parameter int unsigned N         = 4,
  parameter logic [N-1:0] REF_TAPS = '1,
  parameter logic [N-1:0] SEED_VAL = N'(1),
  parameter longint EXP_THD_RAW    = 0,
  parameter longint EXP_THD_ORD    = 0,
  parameter longint EXP_WTM_SUM    = 0
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  logic rst_n = 1, en = 0, load = 0;
  logic [N-1:0] seed, tv, lfsr_q;
  logic serial_out;

  mtpg_top #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .seed(seed),
                         .tv(tv), .lfsr_q(lfsr_q), .serial_out(serial_out));

  function automatic logic [N-1:0] ref_next(input logic [N-1:0] s);
    return {s[N-2:0], ^(s & REF_TAPS)};
  endfunction
  function automatic logic [N-1:0] ref_tv(input logic [N-1:0] s);
    logic [N-1:0] r = s;
    if (s[N-1])
      for (int p = 0; 2 * p + 1 < N - 1 - (N % 2 == 0 ? 1 : 0); p++) begin
        r[2*p] = s[2*p+1];
        r[2*p+1] = s[2*p];
      end
    return r;
  endfunction
  function automatic longint wtm(input logic [N-1:0] v);
    longint w = 0;
    for (int i = 1; i <= N - 1; i++) w += longint'(int'(N) - i) * longint'(v[i-1] ^ v[i]);
    return w;
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL N=%0d %s", N, msg); end
  endtask

  initial begin
    logic [N-1:0] m, prev_q, prev_tv;
    longint thd_raw, thd_ord, wtm_raw, wtm_ord, nvec;
    checks = 0; failures = 0; done = 0; seed = SEED_VAL;
    @(posedge start);
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1; load = 1;
    @(negedge clk); load = 0; en = 1;
    m = SEED_VAL; thd_raw = 0; thd_ord = 0; wtm_raw = 0; wtm_ord = 0; nvec = 0;
    prev_q = '0; prev_tv = '0;
    for (longint i = 0; i < (longint'(1) << N) - 1; i++) begin
      checks++;
      if (tv != ref_tv(m)) begin
        failures++;
        $display("FAIL N=%0d vector %0d: %h expected %h", N, i, tv, ref_tv(m));
      end
      if (i > 0) begin
        thd_raw += $countones(prev_q ^ lfsr_q);
        thd_ord += $countones(prev_tv ^ tv);
      end
      wtm_raw += wtm(lfsr_q);
      wtm_ord += wtm(tv);
      nvec++;
      prev_q = lfsr_q; prev_tv = tv;
      @(negedge clk);
      m = ref_next(m);
    end
    chk(lfsr_q == SEED_VAL, "period 2^N-1");
    chk(thd_raw == EXP_THD_RAW, $sformatf("raw THD %0d expected %0d", thd_raw, EXP_THD_RAW));
    chk(thd_ord == EXP_THD_ORD, $sformatf("reordered THD %0d expected %0d", thd_ord, EXP_THD_ORD));
    chk(wtm_ord == EXP_WTM_SUM, $sformatf("weighted transitions %0d expected %0d", wtm_ord, EXP_WTM_SUM));
    $display("N=%0d vectors=%0d THD raw=%0d reordered=%0d (%0.2f%% less) avg weighted transitions raw=%0.4f reordered=%0.4f",
             N, nvec, thd_raw, thd_ord, 100.0 * real'(thd_raw - thd_ord) / real'(thd_raw),
             real'(wtm_raw) / real'(nvec), real'(wtm_ord) / real'(nvec));
    en = 0;
    done = 1;
  end
endmodule
