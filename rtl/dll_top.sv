`timescale 1ns/1fs
// dll_top: delta-sigma DLL clock synchronizer.
//
// A delay-locked loop whose feedback phase, not its reference, is dithered by
// a delta-sigma modulator, used to align an output clock to an incoming clock
// phi_in of the same frequency (50..250 MHz) with about 15 ps steps.
//
// Core loop: the reference phi_ref drives a 13-cell delay line. The feedback
// phase phi_dll is taken from taps base..base+3 (base 8 or 7), the tap chosen
// anew every cycle by the modulator so that on average the loop locks
// N_average = base + 1 + K/2^m cells to one clock period:
//   Td = Tclk / N_average.
// A phase detector, a bias-tracking charge pump and an adaptive second-order
// filter close the loop; the anti-harmonic detector overrides the phase
// detector when the feedback delay is outside 0.5..1.5 Tclk.
//
// Peripheral loop: once start is high the FSM picks the output tap (4..13)
// closest before the edge of phi_in using the coarse phase detector, then
// tunes K by successive approximation (switching the feedback group from
// 8..11 to 7..10 if needed) until the output tap edge sits within one fine
// step before the edge of phi_in.
//
// Clocking and start-up: the reference is held off the delay line until the
// first falling edge of phi_ref after rst_n rises, so the line starts empty
// and the phase detector and anti-harmonic detector, reset by rst_n and
// seeing no edge until then, start in step with it.
// The modulator is clocked by the falling edge of the last tap of the
// feedback group (11 for group 8..11, 10 for group 7..10). At that instant
// the other three candidate taps have already fallen and the first one will
// not rise again for T/2 - 3 Td, so as long as Td < Tclk/6 (feedback delay
// below 1.5 Tclk, the whole lock range) changing the selection creates no
// spurious feedback edge. An
// identical multiplexer in the reference path matches the feedback
// multiplexer's delay. The FSM runs on phi_ref.
//
// Analog parts (delay lines, phase detector, charge pump, loop filter) are
// behavioural models; the multiplexers, modulator, anti-harmonic detector,
// coarse phase detector flip-flops and FSM are synthesizable logic. The
// structure follows the published design; the start-up gating and the
// modulator clock choice are this implementation's.
//
// Parameters: V_INIT is the loop-filter voltage at reset (start-up delay);
// REVAL_TICKS the number of decisions between revalidations.
module dll_top
  import dll_pkg::*;
#(
  parameter real         V_INIT      = 0.5,
  parameter int unsigned REVAL_TICKS = 32
) (
  input  logic             phi_ref,       // clean reference clock
  input  logic             phi_in,        // clock to synchronize to
  input  logic             rst_n,         // asynchronous, active low
  input  logic             start,         // enable coarse/fine tuning
  input  logic [2:0]       m_res,         // modulator resolution m (5..7)
  input  logic [4:0]       icp_code,      // charge-pump current ratio x*16
  input  logic [15:0]      decision_div,  // reference clocks per decision - 1
  output logic             phi_out,       // synchronized output clock
  output logic             phi_dll,       // dithered feedback phase
  output logic             locked,        // synchronization complete
  output logic [K_W-1:0]   k,             // modulator control word
  output fb_group_e        grp,           // feedback tap group
  output logic [TAP_W-1:0] out_tap,       // selected output tap
  output logic             hold,          // coarse detector: in interval E
  output logic             updn,          // coarse detector: move earlier
  output logic             under,         // feedback delay < 0.5 Tclk
  output logic             over,          // feedback delay > 1.5 Tclk
  output real              vf             // delay-line control voltage
);

  // ---- start-up gate ----
  logic run_q, phi_ref_g, phi_ref_m;
  always_ff @(negedge phi_ref or negedge rst_n) begin
    if (!rst_n) run_q <= 1'b0;
    else        run_q <= 1'b1;
  end
  assign phi_ref_g = phi_ref & run_q;

  // matching multiplexer in the reference path (tap 1 = the reference)
  phase_mux u_ref_mux (
    .taps ({{(NUM_CELLS-1){1'b0}}, phi_ref_g}),
    .sel  (TAP_W'(1)),
    .out  (phi_ref_m)
  );

  // ---- delay line ----
  logic [NUM_CELLS:1] taps;
  real                td_ns, vcp, i_cp;

  vcdl #(.N(NUM_CELLS)) u_vcdl (
    .clk_in (phi_ref_g),
    .vf     (vf),
    .taps   (taps),
    .td_ns  (td_ns)
  );

  // ---- dithered feedback ----
  logic [1:0]       dsm_y;
  fb_group_e        dsm_sel;
  logic [TAP_W-1:0] fb_tap, dsm_clk_tap;
  logic             dsm_clk_n, dsm_clk;

  assign fb_tap      = TAP_W'(fb_base(dsm_sel)) + TAP_W'(dsm_y);
  assign dsm_clk_tap = TAP_W'(fb_base(dsm_sel) + 3);

  phase_mux u_fb_mux  (.taps(taps), .sel(fb_tap),      .out(phi_dll));
  phase_mux u_clk_mux (.taps(taps), .sel(dsm_clk_tap), .out(dsm_clk_n));
  assign dsm_clk = ~dsm_clk_n;

  ds_modulator u_dsm (
    .clk    (dsm_clk),
    .rst_n  (rst_n),
    .k      (k),
    .m      (m_res),
    .grp_in (grp),
    .y      (dsm_y),
    .sel    (dsm_sel)
  );

  // ---- core loop ----
  logic pd_up, pd_dn;

  phase_detector u_pd (
    .ref_clk (phi_ref_m),
    .fb_clk  (phi_dll),
    .rst_n   (rst_n),
    .up      (pd_up),
    .dn      (pd_dn)
  );

  ahd u_ahd (
    .phi_ref (phi_ref_m),
    .phi_dll (phi_dll),
    .rst_n   (rst_n),
    .under   (under),
    .over    (over)
  );

  charge_pump u_cp (
    .up    (pd_up),
    .dn    (pd_dn),
    .under (under),
    .over  (over),
    .code  (icp_code),
    .vf    (vf),
    .i_cp  (i_cp)
  );

  loop_filter #(.V_INIT(V_INIT)) u_lf (
    .rst_n (rst_n),
    .i_cp  (i_cp),
    .vf    (vf),
    .vcp   (vcp)
  );

  // ---- output phase and coarse phase detector ----
  logic [3:1] in_d, out_d;
  real        td_in_ns, td_out_ns;

  phase_mux u_out_mux (.taps(taps), .sel(out_tap), .out(phi_out));

  vcdl #(.N(3)) u_cpd_in_line  (.clk_in(phi_in),  .vf(vf), .taps(in_d),  .td_ns(td_in_ns));
  vcdl #(.N(3)) u_cpd_out_line (.clk_in(phi_out), .vf(vf), .taps(out_d), .td_ns(td_out_ns));

  cpd u_cpd (
    .out_d3 (out_d[3]),
    .rst_n  (rst_n),
    .in_d1  (in_d[1]),
    .in_d2  (in_d[2]),
    .in_d3  (in_d[3]),
    .updn   (updn),
    .hold   (hold)
  );

  // ---- synchronization FSM ----
  sync_state_e fsm_state;

  sync_fsm #(.REVAL_TICKS(REVAL_TICKS)) u_fsm (
    .clk          (phi_ref),
    .rst_n        (rst_n),
    .start        (start),
    .m            (m_res),
    .decision_div (decision_div),
    .hold_a       (hold),
    .updn_a       (updn),
    .k            (k),
    .grp          (grp),
    .out_tap      (out_tap),
    .locked       (locked),
    .state        (fsm_state)
  );

endmodule
