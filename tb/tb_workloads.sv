// Runs the generator at the widths evaluated for the technique (3, 4, 8, 12 and
// 16 bits), each through its full set of 2^N-1 vectors, and reports the total
// Hamming distance of the raw and reordered sequences and the average weighted
// transition count of the vectors. The 3-bit run starts from 011 and must
// reproduce the worked example (raw THD 11, reordered THD 9); the others start
// from seed 0..01 and are checked against separately computed values for the
// default tap polynomials.
module tb_workloads;
  logic clk = 0, start = 0;
  int checks = 0, failures = 0;
  logic d [5];
  int c [5], f [5];

  always #5 clk = ~clk;

  tpg_workload_run #(.N(3),  .REF_TAPS(3'b110),             .SEED_VAL(3'b110),
                     .EXP_THD_RAW(11),     .EXP_THD_ORD(9),      .EXP_WTM_SUM(12))
    r3  (.clk(clk), .start(start), .done(d[0]), .checks(c[0]), .failures(f[0]));
  tpg_workload_run #(.N(4),  .REF_TAPS(4'b1100),
                     .EXP_THD_RAW(30),     .EXP_THD_ORD(26),     .EXP_WTM_SUM(48))
    r4  (.clk(clk), .start(start), .done(d[1]), .checks(c[1]), .failures(f[1]));
  tpg_workload_run #(.N(8),  .REF_TAPS(8'b1011_1000),
                     .EXP_THD_RAW(1022),   .EXP_THD_ORD(830),    .EXP_WTM_SUM(3584))
    r8  (.clk(clk), .start(start), .done(d[2]), .checks(c[2]), .failures(f[2]));
  tpg_workload_run #(.N(12), .REF_TAPS(12'b1000_0010_1001),
                     .EXP_THD_RAW(24574),  .EXP_THD_ORD(19454),  .EXP_WTM_SUM(135168))
    r12 (.clk(clk), .start(start), .done(d[3]), .checks(c[3]), .failures(f[3]));
  tpg_workload_run #(.N(16), .REF_TAPS(16'b1101_0000_0000_1000),
                     .EXP_THD_RAW(524286), .EXP_THD_ORD(409598), .EXP_WTM_SUM(3932160))
    r16 (.clk(clk), .start(start), .done(d[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    start = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
