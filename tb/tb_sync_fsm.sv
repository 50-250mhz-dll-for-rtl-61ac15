`timescale 1ns/1fs
// tb_sync_fsm: closes the outer loop around the controller with an ideal
// plant. For the controller's (out_tap, K, group) the plant computes where
// the rising edge of phi_out lies in the clock period,
//   p_out = out_tap * Tclk / N_avg,  N_avg = base + 1 + K / 2^m,
// and, from the position p_in of the edge of phi_in, the coarse detector's
// outputs: HOLD when phi_out is at most one cell delay (Tclk / N_avg) before
// phi_in, else UPDN = 1 when phi_out lies within half a period after phi_in.
//
// For random p_in and every m the final state is compared with an
// exhaustive search: HOLD must hold at the result and K must be the smallest
// K of the group that still holds (the latest phi_out before phi_in), and the
// group switch to 7..10 must happen exactly when K = 0 of group 8..11 still
// holds. Also checked: the pace of the decisions (one every
// decision_div + 1 clocks), the reset values, the clamp of m to 5, the
// undo of a group switch that overshoots, and the revalidation after
// REVAL_TICKS decisions, which must follow a new p_in.
module tb_sync_fsm;
  import dll_pkg::*;

  localparam real TCLK  = 10.0;
  localparam int  RTICK = 6;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [2:0]  m = 3'd5;
  logic [15:0] decision_div = 16'd7;
  logic hold_a, updn_a;
  logic [K_W-1:0] k;
  fb_group_e grp;
  logic [TAP_W-1:0] out_tap;
  logic locked;
  sync_state_e state;

  real p_in = 3.0;
  int  checks = 0, failures = 0;

  always #(TCLK / 2.0) clk = ~clk;

  sync_fsm #(.REVAL_TICKS(RTICK)) dut (
    .clk, .rst_n, .start, .m, .decision_div, .hold_a, .updn_a,
    .k, .grp, .out_tap, .locked, .state);

  function automatic int m_eff(logic [2:0] mm);
    return (mm < 3'(M_MIN)) ? M_MIN : int'(mm);
  endfunction

  function automatic real n_avg(int kk, fb_group_e g, int mm);
    return real'(fb_base(g)) + 1.0 + real'(kk) / real'(1 << mm);
  endfunction

  // phi_in minus phi_out, modulo the period, in [0, TCLK)
  function automatic real phase_diff(int tap, int kk, fb_group_e g, int mm, real pin);
    real d = pin - real'(tap) * TCLK / n_avg(kk, g, mm);
    d = d - TCLK * $floor(d / TCLK);
    return d;
  endfunction

  function automatic bit plant_hold(int tap, int kk, fb_group_e g, int mm, real pin);
    real d = phase_diff(tap, kk, g, mm, pin);
    return (d > 0.0) && (d <= TCLK / n_avg(kk, g, mm));
  endfunction

  always_comb begin
    real d;
    d = phase_diff(int'(out_tap), int'(k), grp, m_eff(m), p_in);
    hold_a = plant_hold(int'(out_tap), int'(k), grp, m_eff(m), p_in);
    updn_a = !hold_a && (d >= TCLK / 2.0);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decision pace: while coarse tuning, out_tap moves on every decision
  int clk_cnt = 0, last_move = -1, pace_err = 0, pace_seen = 0;
  always @(posedge clk) begin
    clk_cnt++;
  end
  logic [TAP_W-1:0] tap_prev;
  always @(negedge clk) begin
    if (state == ST_COARSE && tap_prev != out_tap) begin
      if (last_move >= 0) begin
        pace_seen++;
        if (clk_cnt - last_move != int'(decision_div) + 1) pace_err++;
      end
      last_move = clk_cnt;
    end
    if (state != ST_COARSE) last_move = -1;
    tap_prev = out_tap;
  end

  // statistics of the paths taken
  int n_switch = 0, n_undo = 0;
  fb_group_e grp_prev = GRP_8_11;
  always @(negedge clk) begin
    if (grp_prev == GRP_8_11 && grp == GRP_7_10) n_switch++;
    if (grp_prev == GRP_7_10 && grp == GRP_8_11 && state == ST_LOCKED) n_undo++;
    grp_prev = grp;
  end

  task automatic wait_locked(output bit ok);
    ok = 0;
    for (int i = 0; i < 64 * (int'(decision_div) + 1); i++) begin
      @(posedge clk);
      if (locked) begin ok = 1; break; end
    end
  endtask

  // checks the locked result against the exhaustive search
  task automatic check_result(string tag);
    int mm = m_eff(m);
    int t = int'(out_tap);
    int kmin8 = -1, kmin7 = -1;
    bit ones7;
    for (int kk = (1 << mm) - 1; kk >= 0; kk--)
      if (plant_hold(t, kk, GRP_8_11, mm, p_in)) kmin8 = kk;
    ones7 = plant_hold(t, (1 << mm) - 1, GRP_7_10, mm, p_in);
    for (int kk = (1 << mm) - 1; kk >= 0; kk--)
      if (plant_hold(t, kk, GRP_7_10, mm, p_in)) kmin7 = kk;
    check(hold_a, $sformatf("%s p_in=%f: no HOLD at tap %0d K %0d grp %s",
                            tag, p_in, t, k, grp.name()));
    if (kmin8 == 0 && ones7) begin
      check(grp == GRP_7_10 && int'(k) == kmin7,
            $sformatf("%s p_in=%f m=%0d tap %0d: got K %0d %s, exp K %0d GRP_7_10",
                      tag, p_in, mm, t, k, grp.name(), kmin7));
    end else begin
      check(grp == GRP_8_11 && int'(k) == kmin8,
            $sformatf("%s p_in=%f m=%0d tap %0d: got K %0d %s, exp K %0d GRP_8_11",
                      tag, p_in, mm, t, k, grp.name(), kmin8));
    end
  endtask

  task automatic run_once(real pin, logic [2:0] mm, string tag);
    bit ok;
    start = 1'b0;
    m = mm;
    p_in = pin;
    repeat (3) @(posedge clk);
    check(state == ST_IDLE && out_tap == TAP_W'(OUT_TAP_INIT) && grp == GRP_8_11 &&
          int'(k) == (1 << m_eff(mm)) - 1,
          $sformatf("%s: preset while start is low (tap %0d K %0d)", tag, out_tap, k));
    start = 1'b1;
    wait_locked(ok);
    check(ok, $sformatf("%s p_in=%f m=%0d: no lock", tag, pin, mm));
    if (ok) check_result(tag);
  endtask

  initial begin
    bit ok;
    int unsigned seed_draw;
    rst_n = 1'b0; #1 rst_n = 1'b1;
    @(posedge clk);
    check(state == ST_IDLE && !locked, "state after reset");

    // random phases, every resolution
    for (int i = 0; i < 120; i++) begin
      logic [2:0] mm = 3'(5 + (i % 3));
      seed_draw = $urandom_range(0, 99_999);
      run_once(TCLK * real'(seed_draw) / 100_000.0, mm, "random");
    end
    check(pace_seen > 50 && pace_err == 0,
          $sformatf("decision pace: %0d moves checked, %0d wrong", pace_seen, pace_err));

    // m below 5 behaves as m = 5
    run_once(4.321, 3'd2, "m clamp");
    check(int'(k) < 32, "m clamp: K fits in 5 bits");

    // group switch kept: phi_in just after tap 6 at N_avg = 9
    run_once(6.0 * TCLK / 9.0 + 0.05, 3'd6, "switch");
    check(grp == GRP_7_10, "switch: group 7..10 expected");
    // group switch undone: phi_in between N_avg = 9 and N_avg just under 9
    begin
      real p9  = 6.0 * TCLK / 9.0;
      real p89 = 6.0 * TCLK / n_avg(127, GRP_7_10, 7);
      int  u0;
      u0 = n_undo;
      run_once(p9 + 0.3 * (p89 - p9), 3'd7, "undo");
      check(grp == GRP_8_11 && k == '0 && n_undo == u0 + 1,
            $sformatf("undo: got K %0d %s, undo count %0d", k, grp.name(), n_undo - u0));
    end
    check(n_switch > 5, $sformatf("group switches seen: %0d", n_switch));

    // revalidation: after RTICK decisions the controller searches again
    run_once(2.5, 3'd5, "reval");
    begin
      int c0;
      c0 = clk_cnt;
      p_in = 7.7;
      while (locked && clk_cnt - c0 < 100 * (int'(decision_div) + 1)) @(posedge clk);
      check(!locked && state == ST_COARSE && grp == GRP_8_11 && int'(k) == 31,
            $sformatf("reval: left LOCKED in state %s K %0d", state.name(), k));
      check(clk_cnt - c0 <= RTICK * (int'(decision_div) + 1) + 1,
            $sformatf("reval: took %0d clocks", clk_cnt - c0));
      wait_locked(ok);
      check(ok, "reval: no relock");
      if (ok) check_result("reval");
    end

    $display("paths: switches %0d undone %0d", n_switch, n_undo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
