`timescale 1ns/1fs
// loop_filter: BEHAVIOURAL MODEL of the adaptive second-order loop filter.
//
// The charge-pump current charges C1 (node V_CP); a MOSFET in its linear
// region, acting as resistor R, connects V_CP to C2, whose voltage V_F
// controls the delay cells. F(s) = 1 / (s^2 C1 C2 R + s (C1 + C2)).
// R tracks the inverse transconductance of the delay cells:
//   1/R = ALPHA * g_mp,   g_mp = K_P * (VOV0 - V_F),
// so the second pole 1/(R C2) moves with the first and the ratio of the two
// poles, hence the phase margin, stays put across the input frequency range.
//
// The two node voltages are integrated with forward Euler, at every change
// of the pump current (so each pulse's charge is exact) and every STEP_NS
// in between. While rst_n is low both nodes are held at V_INIT.
//
// Following the published design: the C1-R-C2 topology, C1 = 300 pF,
// C2 = 30 pF and the R tracking 1/g_mp. This implementation's choices:
// ALPHA = 0.11 (about 2.2 between the two poles with the pump model at x = 1),
// the device constants, V_INIT and the integration method.
//
// Interface: i_cp in amperes; vf and vcp in volts.
module loop_filter #(
  parameter real C1      = 300.0e-12,
  parameter real C2      = 30.0e-12,
  parameter real ALPHA   = 0.11,
  parameter real KP      = 150.0e-15 / 0.357e-9,
  parameter real VOV0    = 2.189,
  parameter real V_INIT  = 0.5,
  parameter real STEP_NS = 1.0
) (
  input  logic rst_n,
  input  real  i_cp,
  output real  vf,
  output real  vcp
);

  real  v1, v2, i_prev, t_last;
  logic tick;

  initial begin
    v1 = V_INIT; v2 = V_INIT; i_prev = 0.0; t_last = 0.0; tick = 1'b0;
  end

  always #(STEP_NS / 2.0) tick = ~tick;

  always @(i_cp or posedge tick or rst_n) begin
    real dt, gmp, ir;
    dt = ($realtime - t_last) * 1.0e-9;
    if (!rst_n) begin
      v1 = V_INIT;
      v2 = V_INIT;
    end else if (dt > 0.0) begin
      gmp = KP * ((VOV0 - v2 > 0.01) ? VOV0 - v2 : 0.01);
      ir  = (v1 - v2) * ALPHA * gmp;       // current through R
      v1  = v1 + (i_prev - ir) * dt / C1;
      v2  = v2 + ir * dt / C2;
    end
    t_last = $realtime;
    i_prev = i_cp;
  end

  assign vf  = v2;
  assign vcp = v1;

endmodule
