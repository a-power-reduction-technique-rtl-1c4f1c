// Switching unit: one LFSR stage with a data-driven gated clock.
//
// A D flip-flop whose clock pin is driven by its own control logic
// (cl_clock_gate), which compares the flip-flop's input d with its output q.
// When d equals q the flip-flop receives no clock edge at all, which saves the
// clock-pin and internal switching power of a flip-flop that would only reload
// the value it already holds. Logically the unit behaves exactly like a plain
// D flip-flop on posedge clk: q takes d at every rising clock edge.
//
// Interface: clk (free running), rst_n (asynchronous, active low, forces
// RESET_VAL without needing a clock edge), d, q. The reset is this design's
// addition.
module switching_unit #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic gclk;

  cl_clock_gate u_cl (
    .clk      (clk),
    .data_in  (d),
    .data_out (q),
    .gclk     (gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VAL;
    else        q <= d;
  end

endmodule
