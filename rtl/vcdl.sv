`timescale 1ns/1fs
// vcdl: BEHAVIOURAL MODEL of the voltage-controlled delay line (not
// synthesizable; the real part is a chain of differential analog cells).
//
// N identical delay cells in series; taps[k] is the output of cell k. Every
// cell delays both edges of its input by the same time Td, set by the loop
// filter voltage V_F through the square-law load of the cell:
//   Td = A / (VOV0 - V_F),   VOV0 = VDD - |Vthp|,
// so the delay grows with V_F. A = C_EFF/K_P = 0.357 ns*V and VOV0 = 2.189 V
// fit the published simulated curve (0.3 ns at 1.0 V, 4 ns at 2.1 V, about
// 0.9 ns at 1.8 V); Td is limited to TD_MIN_NS..TD_MAX_NS. The replica bias
// and the dummy load cell after the last cell only keep all cells equal in
// the silicon, which this model assumes anyway, so they have no counterpart
// here. The same model with N = 3 provides the delay cells of the coarse
// phase detector.
//
// Interface: clk_in is the clock entering the line; vf the control voltage
// in volts; td_ns reports the present cell delay. Edges are passed with
// transport delay; the line starts empty (all taps low).
module vcdl
  import dll_pkg::*;
#(
  parameter int  N         = NUM_CELLS,
  parameter real A_NS_V    = 0.357,   // C_EFF / K_P, in ns*V
  parameter real VOV0      = 2.189,   // VDD - |Vthp|, in V
  parameter real TD_MIN_NS = 0.2,
  parameter real TD_MAX_NS = 12.0
) (
  input  logic     clk_in,
  input  real      vf,
  output logic [N:1] taps,
  output real      td_ns
);

  function automatic real cell_delay(real v);
    real d;
    if (VOV0 - v <= A_NS_V / TD_MAX_NS) d = TD_MAX_NS;
    else                                d = A_NS_V / (VOV0 - v);
    if (d < TD_MIN_NS) d = TD_MIN_NS;
    if (d > TD_MAX_NS) d = TD_MAX_NS;
    return d;
  endfunction

  assign td_ns = cell_delay(vf);

  logic [N:0] stage;
  assign stage[0] = clk_in;

  for (genvar i = 1; i <= N; i++) begin : g_cell
    initial stage[i] = 1'b0;
    // the value and the delay are captured at the input edge, so every edge
    // travels with the delay that was valid when it entered the cell
    always @(stage[i-1]) begin
      automatic logic v = stage[i-1];
      automatic real  d = td_ns;
      fork
        begin
          #(d);
          stage[i] = v;
        end
      join_none
    end
  end

  assign taps = stage[N:1];

endmodule
