`timescale 1ns/1fs
// ahd: anti-harmonic lock detector.
//
// The delay cells cover a very wide delay range, so the core loop could lock
// with the feedback edge a whole period off. This detector watches where the
// rising edge of the feedback phase phi_dll falls relative to the falling edges
// of the reference phi_ref and flags
//   UNDER when the feedback delay is below 0.5 Tclk,
//   OVER  when it is above 1.5 Tclk,
// which the charge pump uses in place of the phase detector's output.
//
// It works on edge positions, not on sampled levels, so the duty cycle of the
// dithered feedback clock does not matter (phi_ref must be near 50%). Two
// circular one-hot shift registers of LEN bits are reset to the same position;
// one rotates on each falling edge of phi_ref, the other on each rising edge
// of phi_dll. The rotation difference d = pos_ref - pos_dll (mod LEN) is 0 or
// 1 inside the lock range. If the reference falling edge is ahead by 2
// positions the feedback is late (OVER); if it is behind by 1 position
// (d = LEN-1) the feedback is early (UNDER). Both flags are combinational
// from the two registers, so they are pulses between the two edges, as in the
// published timing: UNDER from the feedback rising edge to the next reference
// falling edge, OVER from the reference falling edge to the feedback rising
// edge.
//
// Following the published design: the two circular shift registers, the
// clock edges they use and the 2-position / 1-position rules. This
// implementation's choices: ring length 4 and the reset state (both at
// position 0). The reset must be released while no edge is travelling through
// the delay line, which the top ensures by gating the reference at start-up.
module ahd #(
  parameter int LEN = 4   // ring length, at least 4
) (
  input  logic phi_ref,   // reference clock (falling edges counted)
  input  logic phi_dll,   // feedback clock (rising edges counted)
  input  logic rst_n,     // asynchronous, active low
  output logic under,     // feedback delay < 0.5 Tclk
  output logic over       // feedback delay > 1.5 Tclk
);

  logic [LEN-1:0] ring_ref, ring_dll;

  always_ff @(negedge phi_ref or negedge rst_n) begin
    if (!rst_n) ring_ref <= LEN'(1);
    else        ring_ref <= {ring_ref[LEN-2:0], ring_ref[LEN-1]};
  end

  always_ff @(posedge phi_dll or negedge rst_n) begin
    if (!rst_n) ring_dll <= LEN'(1);
    else        ring_dll <= {ring_dll[LEN-2:0], ring_dll[LEN-1]};
  end

  // ring_dll rotated up by 2 lines up with ring_ref when d == 2;
  // rotated down by 1 when d == LEN-1.
  logic [LEN-1:0] dll_plus2, dll_minus1;
  assign dll_plus2  = {ring_dll[LEN-3:0], ring_dll[LEN-1:LEN-2]};
  assign dll_minus1 = {ring_dll[0], ring_dll[LEN-1:1]};

  assign over  = |(ring_ref & dll_plus2);
  assign under = |(ring_ref & dll_minus1);

  a_not_both: assert property (@(posedge phi_dll) disable iff (!rst_n) !(under && over));

  initial assert (LEN >= 4) else $error("ahd: LEN must be at least 4");

endmodule
