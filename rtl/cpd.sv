`timescale 1ns/1fs
// cpd: coarse loop phase detector (sampling and decoding part).
//
// It tells the FSM where the selected output phase phi_out lies inside the
// period of the incoming clock phi_in, split into ten intervals A..J of one
// delay-cell delay Td each (A starts at the falling edge of phi_in, F at its
// rising edge). phi_in passes through three delay cells, giving in_d1..in_d3;
// phi_out passes through three identical cells, giving out_d3, whose rising
// edge clocks three flip-flops that sample in_d1, in_d2 and in_d3. Relative
// to the phi_out edge at time t, the samples are phi_in(t+2Td), phi_in(t+Td)
// and phi_in(t):
//   UPDN = phi_in(t)                                  (1 in F..J, 0 in A..E)
//   HOLD = !phi_in(t) & phi_in(t+Td) & phi_in(t+2Td)  (1 only in E)
// which reproduces the published truth table: HOLD is 1 only in interval E,
// UPDN is 1 in F..J. UPDN = 1 asks for an earlier tap, 0 for a later one.
//
// The delay cells are analog and live outside this module (the top builds
// them from the delay-line model driven by the same control voltage); this
// module is the digital part: the three flip-flops and the decode. The
// structure is the published design's; the decode is derived from its truth
// table, and the asynchronous reset is this implementation's.
//
// Interface and timing: updn and hold are registered on the rising edge of
// out_d3 and are asynchronous to every other clock; the FSM synchronizes them.
module cpd (
  input  logic out_d3,   // phi_out delayed by 3 cells: sampling clock
  input  logic rst_n,    // asynchronous, active low
  input  logic in_d1,    // phi_in delayed by 1 cell
  input  logic in_d2,    // phi_in delayed by 2 cells
  input  logic in_d3,    // phi_in delayed by 3 cells
  output logic updn,     // 1: move to an earlier tap, 0: to a later tap
  output logic hold      // phi_out is in interval E
);

  logic q1, q2, q3;

  always_ff @(posedge out_d3 or negedge rst_n) begin
    if (!rst_n) {q1, q2, q3} <= 3'b000;
    else        {q1, q2, q3} <= {in_d1, in_d2, in_d3};
  end

  assign updn = q3;
  assign hold = q1 & q2 & ~q3;

endmodule
