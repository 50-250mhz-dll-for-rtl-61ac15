`timescale 1ns/1fs
// dll_sync_run: testbench helper. Runs one synchronizer with every parameter
// at its default at clock period T_NS and resolution M: reset, core lock
// (checked against Td = T / N_avg with K all ones), then one synchronization
// to a phi_in whose rising edge trails phi_ref's by P_IN_FRAC * T.
// It checks that
//   - the coarse detector reports HOLD at least some of the time at the
//     chosen tap;
//   - the mean phase error phi_out - phi_in lies between minus one fine step
//     (the delay change of the chosen tap for one LSB of K) and zero, widened
//     by half the measured peak-to-peak wander of phi_out plus 2 ps, since
//     every decision rests on the position of a single edge;
// T_SETTLE_NS after it reaches lock (the last decision may have restored a
// bit, and the core loop needs time to come back), and raises done. checks / failures count its own checks; fine_step_ps
// and err_ps report the result.
module dll_sync_run
  import dll_pkg::*;
#(
  parameter real         T_NS      = 5.0,
  parameter int unsigned M         = 5,
  parameter real         P_IN_FRAC = 0.37,
  parameter real         T_CORE_NS = 100_000.0, // core lock time allowed
  parameter int unsigned DIV       = 8191,      // clocks per decision - 1
  parameter real         T_SETTLE_NS = 50_000.0 // wait after lock before measuring
) (
  output bit  done,
  output int  checks,
  output int  failures,
  output real fine_step_ps,
  output real err_ps
);

  logic phi_ref = 1'b0, phi_in = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic phi_out, phi_dll, locked, hold, updn, under, over;
  logic [K_W-1:0] k;
  fb_group_e grp;
  logic [TAP_W-1:0] out_tap;
  real vf;
  real p_in_r = P_IN_FRAC * T_NS;

  always #(T_NS / 2.0) phi_ref = ~phi_ref;
  always @(posedge phi_ref) begin
    automatic real d = p_in_r;
    fork
      begin #(d); phi_in = 1'b1; #(T_NS / 2.0); phi_in = 1'b0; end
    join_none
  end

  dll_top dut (
    .phi_ref, .phi_in, .rst_n, .start, .m_res(3'(M)), .icp_code(5'd16),
    .decision_div(16'(DIV)),
    .phi_out, .phi_dll, .locked, .k, .grp, .out_tap, .hold, .updn,
    .under, .over, .vf);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0.0f MHz: %s", 1000.0 / T_NS, what);
    end
  endtask

  function automatic real n_avg(int kk, fb_group_e g);
    return real'(fb_base(g)) + 1.0 + real'(kk) / real'(1 << M);
  endfunction

  real t_in = 0.0, err = 0.0;
  always @(posedge phi_in) t_in = $realtime;
  always @(posedge phi_out) begin
    err = $realtime - t_in;
    if (err > T_NS / 2.0) err = err - T_NS;
  end

  initial begin
    real td_exp, s, e_min, e_max, pp_ps;
    int  n_hold;
    done = 0; checks = 0; failures = 0;
    rst_n = 1'b0; #1 rst_n = 1'b1; #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    #(T_CORE_NS);
    td_exp = T_NS / n_avg((1 << M) - 1, GRP_8_11);
    check(dut.td_ns > 0.995 * td_exp && dut.td_ns < 1.005 * td_exp,
          $sformatf("core lock: Td %f ns, expected %f", dut.td_ns, td_exp));
    start = 1'b1;
    while (!locked) @(posedge phi_ref);
    // the last decision may have restored a bit: let the core loop settle
    #(T_SETTLE_NS);
    check(locked, "lock lost while settling");
    fine_step_ps = 1000.0 * real'(out_tap) * T_NS *
                   (1.0 / n_avg(int'(k) - 1, grp) - 1.0 / n_avg(int'(k), grp));
    s = 0.0;
    e_min = 1.0e9;
    e_max = -1.0e9;
    n_hold = 0;
    for (int i = 0; i < 400; i++) begin
      @(posedge phi_ref); #(T_NS / 4.0);
      s += err;
      if (err < e_min) e_min = err;
      if (err > e_max) e_max = err;
      if (hold) n_hold++;
    end
    err_ps = 1000.0 * s / 400.0;
    pp_ps  = 1000.0 * (e_max - e_min);
    // each decision samples one edge, so the result may be off by the
    // peak-to-peak wander of phi_out caused by the dithered feedback
    check(err_ps < pp_ps / 2.0 + 2.0 && err_ps > -(fine_step_ps + pp_ps / 2.0 + 2.0),
          $sformatf("phase error %f ps, allowed %f .. %f", err_ps,
                    -(fine_step_ps + pp_ps / 2.0 + 2.0), pp_ps / 2.0 + 2.0));
    check(n_hold > 0, "HOLD never seen at the final tap");
    $display("%0.0f MHz m=%0d: tap %0d K %0d group %s, error %0.1f ps, wander %0.1f ps pp, fine step %0.1f ps, HOLD %0d/400",
             1000.0 / T_NS, M, out_tap, k, grp.name(), err_ps, pp_ps, fine_step_ps, n_hold);
    done = 1;
  end
endmodule
