`timescale 1ns/1fs
// charge_pump: BEHAVIOURAL MODEL of the programmable, bias-tracking charge
// pump.
//
// The pump current is mirrored from the delay cells' bias so that the loop
// bandwidth follows the input frequency: I_CP = x * I_DP, where
// I_DP = (K_P/2) * (VOV0 - V_F)^2 is the load current of one delay cell and
// x = code / 16 is set by the 5-bit programmable current word. The output
// current is +I_CP while "up" is high, -I_CP while "dn" is high. The
// anti-harmonic detector overrides the phase detector: UNDER forces +I_CP
// (more delay), OVER forces -I_CP (less delay).
//
// Following the published design: the current mirrored from the replica
// bias, the 5-bit programmable current and the override by the detector.
// This implementation's choices: x = code/16 and the device constants
// (C_EFF = 150 fF per cell, K_P = C_EFF / 0.357 ns*V, consistent with the
// delay-line model).
//
// Interface: output i_cp in amperes, positive into the filter; recomputed
// whenever an input changes.
module charge_pump #(
  parameter real KP   = 150.0e-15 / 0.357e-9,  // A/V^2
  parameter real VOV0 = 2.189                  // V
) (
  input  logic       up,
  input  logic       dn,
  input  logic       under,
  input  logic       over,
  input  logic [4:0] code,
  input  real        vf,
  output real        i_cp
);

  function automatic real pump(logic u, logic d, logic un, logic ov,
                               logic [4:0] c, real v);
    real vov, idp, i;
    vov = (VOV0 - v > 0.0) ? VOV0 - v : 0.0;
    idp = 0.5 * KP * vov * vov;
    i   = (real'(c) / 16.0) * idp;
    if (un)      return i;
    else if (ov) return -i;
    else         return (u ? i : 0.0) - (d ? i : 0.0);
  endfunction

  assign i_cp = pump(up, dn, under, over, code, vf);

endmodule
