`timescale 1ns/1fs
// tb_loop_filter: checks the filter model.
//  - reset holds both nodes at V_INIT;
//  - charge conservation: a current I for a time t adds I*t to
//    C1*V_CP + C2*V_F, and after settling both nodes sit at
//    V_INIT + I*t/(C1+C2);
//  - the step of V_CP - V_F decays with tau = R * C1*C2/(C1+C2), where
//    1/R = ALPHA * K_P * (VOV0 - V_F), so tau grows as V_F rises.
module tb_loop_filter;
  localparam real C1    = 300.0e-12;
  localparam real C2    = 30.0e-12;
  localparam real ALPHA = 0.11;
  localparam real KP    = 150.0e-15 / 0.357e-9;
  localparam real VOV0  = 2.189;
  localparam real VINIT = 0.5;
  logic rst_n = 1'b1;
  real  i_cp = 0.0, vf, vcp;
  int checks = 0, failures = 0;

  loop_filter dut (.rst_n, .i_cp, .vf, .vcp);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  // measures the time for V_CP - V_F to fall from its value now to 1/e of it
  task automatic measure_tau(output real tau);
    real d0, t0;
    d0 = vcp - vf;
    t0 = $realtime;
    while ((vcp - vf) > d0 / 2.718281828 && $realtime - t0 < 20_000.0) #0.1;
    tau = ($realtime - t0) * 1.0e-9;
  endtask

  initial begin
    real q0, q1, vexp, tau, tau_exp, v_ref;
    rst_n = 1'b0;
    i_cp = 50.0e-6;
    #10;
    check(vf == VINIT && vcp == VINIT, "reset holds V_INIT");
    i_cp = 0.0;
    #1 rst_n = 1'b1;
    #10;

    for (int j = 0; j < 3; j++) begin
      // a charge packet: 100 uA for 20 ns
      v_ref = vf;
      q0 = C1 * vcp + C2 * vf;
      i_cp = 100.0e-6;
      #20;
      i_cp = 0.0;
      #0.001;
      q1 = C1 * vcp + C2 * vf;
      check(near(q1 - q0, 100.0e-6 * 20.0e-9, 1.0e-15),
            $sformatf("charge %e C, expected %e", q1 - q0, 2.0e-12));
      // decay of the difference
      measure_tau(tau);
      tau_exp = (C1 * C2 / (C1 + C2)) / (ALPHA * KP * (VOV0 - 0.5 * (vf + vcp)));
      check(near(tau, tau_exp, 0.1 * tau_exp),
            $sformatf("tau %e s at V_F %f, expected %e", tau, vf, tau_exp));
      #10_000;
      vexp = v_ref + 2.0e-12 / (C1 + C2);
      check(near(vf, vexp, 1.0e-4) && near(vcp, vexp, 1.0e-4),
            $sformatf("settled V_F %f V_CP %f, expected %f", vf, vcp, vexp));
      // move the operating point up for the next round
      i_cp = 1.0e-3;
      #150;
      i_cp = 0.0;
      #20_000;
    end
    // the three rounds ran at three different operating points
    check(vf > 1.2, $sformatf("operating point moved to %f V", vf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
