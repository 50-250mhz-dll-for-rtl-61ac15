`timescale 1ns/1fs
// tb_dll_top: the whole synchronizer end to end at 200 MHz, m = 5.
//
// Instance A starts from V_F = 0.5 V (cell delay far too short, feedback
// delay below half a period: UNDER) and locks the core loop; then phi_in is
// applied with its rising edge 2.6 ns after phi_ref's, so the output phase
// at tap 8 is late (UPDN = 1): the coarse search walks to earlier taps until
// HOLD, then the successive approximation keeps and restores bits of K.
// After lock, phi_in moves to 3.95 ns; REVAL_TICKS is reduced to 4, so the
// controller soon revalidates: the coarse search walks to later taps and K
// reaches 0 in group 8..11 with HOLD still high, so the feedback group
// switches to 7..10 and the search goes on there.
// Instance B starts from V_F = 1.74 V (Td = 0.79 ns, feedback delay about
// 1.58 periods: OVER) and must come back to the right lock, not to a harmonic one.
//
// Checked against values worked out from the period alone:
//   - core lock: Td = Tclk / N_avg with N_avg = 9 + 31/32 (K all ones);
//   - final taps and groups (tap 5, group 8..11 and tap 7, group 7..10);
//   - the final phase error phi_out - phi_in is below zero and above minus
//     one fine step (the change of the tap delay for one LSB of K), with a
//     few ps of margin for the dither ripple;
//   - every mechanism happened at least once: UNDER, OVER, coarse earlier,
//     coarse later, HOLD, fine keep, fine revert, group switch,
//     revalidation and lock.
module tb_dll_top;
  import dll_pkg::*;

  localparam real T      = 5.0;      // 200 MHz
  localparam int  M      = 5;
  localparam real P_IN_1 = 2.6;
  localparam real P_IN_2 = 3.95;

  logic phi_ref = 1'b0, phi_in = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [2:0]  m_res = 3'(M);
  logic [4:0]  icp_code = 5'd16;
  logic [15:0] decision_div = 16'd1023;
  real  p_in = P_IN_1;

  logic phi_out, phi_dll, locked, hold, updn, under, over;
  logic [K_W-1:0] k;
  fb_group_e grp;
  logic [TAP_W-1:0] out_tap;
  real vf;

  logic phi_out_b, phi_dll_b, locked_b, hold_b, updn_b, under_b, over_b;
  logic [K_W-1:0] k_b;
  fb_group_e grp_b;
  logic [TAP_W-1:0] out_tap_b;
  real vf_b;

  int checks = 0, failures = 0;

  always #(T / 2.0) phi_ref = ~phi_ref;
  // phi_in: same frequency, rising edge p_in after each rising edge of phi_ref
  always @(posedge phi_ref) begin
    automatic real d = p_in;
    fork
      begin #(d); phi_in = 1'b1; #(T / 2.0); phi_in = 1'b0; end
    join_none
  end

  dll_top #(.V_INIT(0.5), .REVAL_TICKS(4)) dut (
    .phi_ref, .phi_in, .rst_n, .start, .m_res, .icp_code, .decision_div,
    .phi_out, .phi_dll, .locked, .k, .grp, .out_tap, .hold, .updn,
    .under, .over, .vf);

  dll_top #(.V_INIT(1.74), .REVAL_TICKS(4)) dut_b (
    .phi_ref, .phi_in, .rst_n, .start(1'b0), .m_res, .icp_code, .decision_div,
    .phi_out(phi_out_b), .phi_dll(phi_dll_b), .locked(locked_b), .k(k_b),
    .grp(grp_b), .out_tap(out_tap_b), .hold(hold_b), .updn(updn_b),
    .under(under_b), .over(over_b), .vf(vf_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #2_000_000;
    failures++;
    $display("watchdog: state %s tap %0d K %0d", dut.fsm_state.name(), out_tap, k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_under = 0, n_over = 0, n_earlier = 0, n_later = 0, n_hold = 0;
  int n_keep = 0, n_revert = 0, n_switch = 0, n_reval = 0, n_lock = 0;
  always @(posedge under) n_under++;
  always @(posedge over_b) n_over++;
  always @(posedge over) n_over++;
  always @(posedge hold) n_hold++;
  always @(posedge locked) n_lock++;

  sync_state_e st_prev = ST_IDLE;
  logic [TAP_W-1:0] tap_prev = TAP_W'(OUT_TAP_INIT);
  fb_group_e grp_prev = GRP_8_11;
  always @(negedge phi_ref) begin
    if (dut.u_fsm.tick && dut.fsm_state == ST_FINE_TRY) begin
      if (dut.u_fsm.hold) n_keep++;
      else                n_revert++;
    end
    if (st_prev == ST_COARSE && out_tap != tap_prev) begin
      if (out_tap == tap_prev - 1 || (tap_prev == 4 && out_tap == 13)) n_earlier++;
      else                                                              n_later++;
    end
    if (grp_prev == GRP_8_11 && grp == GRP_7_10) n_switch++;
    if (st_prev == ST_LOCKED && dut.fsm_state == ST_COARSE) n_reval++;
    st_prev  = dut.fsm_state;
    tap_prev = out_tap;
    grp_prev = grp;
  end

  // phase error of the output: rising edge of phi_out minus that of phi_in,
  // folded into (-T/2, T/2]
  real t_in = 0.0, err = 0.0;
  always @(posedge phi_in) t_in = $realtime;
  always @(posedge phi_out) begin
    err = $realtime - t_in;
    if (err > T / 2.0) err = err - T;
  end

  function automatic real n_avg(int kk, fb_group_e g);
    return real'(fb_base(g)) + 1.0 + real'(kk) / real'(1 << M);
  endfunction

  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  // averages err over 200 periods
  task automatic mean_err(output real e);
    real s = 0.0;
    for (int i = 0; i < 200; i++) begin
      @(posedge phi_ref); #(T / 4.0);
      s += err;
    end
    e = s / 200.0;
  endtask

  task automatic check_sync(string tag, int exp_tap, fb_group_e exp_grp);
    real e, step;
    check(out_tap == TAP_W'(exp_tap) && grp == exp_grp,
          $sformatf("%s: tap %0d group %s, expected tap %0d group %s",
                    tag, out_tap, grp.name(), exp_tap, exp_grp.name()));
    // the next smaller K moves the tap this much later
    step = real'(out_tap) * T * (1.0 / n_avg(int'(k) - 1, grp) - 1.0 / n_avg(int'(k), grp));
    mean_err(e);
    check(e < 0.005 && e > -(step + 0.005),
          $sformatf("%s: phase error %f ns, allowed %f .. 0 (K %0d)", tag, e, -step, k));
    $display("%s: tap %0d K %0d group %s, phase error %0.1f ps (fine step %0.1f ps)",
             tag, out_tap, k, grp.name(), e * 1000.0, step * 1000.0);
  endtask

  initial begin
    rst_n = 1'b0; #1 rst_n = 1'b1; #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;

    // core loop lock with K all ones, group 8..11
    #40_000;
    check(near(dut.td_ns, T / n_avg(31, GRP_8_11), 0.005 * T / 9.97),
          $sformatf("core lock A: Td %f ns, expected %f", dut.td_ns, T / n_avg(31, GRP_8_11)));
    check(near(dut_b.td_ns, T / n_avg(31, GRP_8_11), 0.005 * T / 9.97),
          $sformatf("core lock B from OVER: Td %f ns, expected %f", dut_b.td_ns,
                    T / n_avg(31, GRP_8_11)));
    check(n_under > 0 && !under && !over, $sformatf("UNDER at start-up: %0d", n_under));
    check(n_over > 0 && !over_b && !under_b, $sformatf("OVER at start-up: %0d", n_over));

    // synchronization, coarse search towards earlier taps
    start = 1'b1;
    while (!locked) @(posedge phi_ref);
    check(n_earlier == 3 && n_later == 0,
          $sformatf("first search: %0d earlier / %0d later moves, expected 3 / 0", n_earlier, n_later));
    check_sync("phi_in at 2.6 ns", 5, GRP_8_11);

    // phi_in moves; revalidation follows it towards later taps
    p_in = P_IN_2;
    while (locked) @(posedge phi_ref);
    while (!locked) @(posedge phi_ref);
    check(n_later == 2, $sformatf("second search: %0d later moves, expected 2", n_later));
    check_sync("phi_in at 3.95 ns", 7, GRP_7_10);

    check(n_under > 0,   $sformatf("UNDER happened %0d times", n_under));
    check(n_over > 0,    $sformatf("OVER happened %0d times", n_over));
    check(n_earlier > 0, $sformatf("coarse earlier happened %0d times", n_earlier));
    check(n_later > 0,   $sformatf("coarse later happened %0d times", n_later));
    check(n_hold > 0,    $sformatf("HOLD happened %0d times", n_hold));
    check(n_keep > 0,    $sformatf("fine keep happened %0d times", n_keep));
    check(n_revert > 0,  $sformatf("fine revert happened %0d times", n_revert));
    check(n_switch > 0,  $sformatf("group switch happened %0d times", n_switch));
    check(n_reval > 0,   $sformatf("revalidation happened %0d times", n_reval));
    check(n_lock > 1,    $sformatf("lock happened %0d times", n_lock));
    $display("mechanisms: UNDER %0d OVER %0d earlier %0d later %0d HOLD %0d keep %0d revert %0d switch %0d reval %0d lock %0d",
             n_under, n_over, n_earlier, n_later, n_hold, n_keep, n_revert, n_switch, n_reval, n_lock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
