`timescale 1ns/1fs
// tb_phase_detector: checks the three-state detector model.
//  - the first reference edge after reset only arms the detector (the delay
//    line is still empty, so no feedback edge belongs to it);
//  - feedback leading by delta: UP pulses of width delta + reset time, DN
//    only the reset pulse; reference leading: the reverse;
//  - the pulse widths follow delta across -1 ns .. +1 ns.
module tb_phase_detector;
  localparam real T    = 5.0;
  localparam real TRST = 0.05;
  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n = 1'b1;
  logic up, dn;
  real  delta;          // feedback edge minus reference edge
  bit   fb_on = 0;
  int checks = 0, failures = 0;

  phase_detector dut (.ref_clk, .fb_clk, .rst_n, .up, .dn);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real t_up, t_dn, w_up, w_dn;
  int  n_up, n_dn;
  always @(posedge up) begin n_up++; t_up = $realtime; end
  always @(negedge up) w_up = $realtime - t_up;
  always @(posedge dn) begin n_dn++; t_dn = $realtime; end
  always @(negedge dn) w_dn = $realtime - t_dn;

  // feedback = reference of the previous period shifted by delta
  real delta_r = 0.0;
  always @(posedge ref_clk) begin
    automatic real d = T + delta_r;
    if (fb_on)
      fork
        begin #(d); fb_clk = 1'b1; #(T / 2.0); fb_clk = 1'b0; end
      join_none
  end

  function automatic bit near(real a, real b);
    return (a - b <= 1.0e-6) && (b - a <= 1.0e-6);
  endfunction

  initial begin
    rst_n = 1'b0; #1 rst_n = 1'b1;
    n_up = 0; n_dn = 0;
    // first reference edge alone: nothing may happen
    #1 ref_clk = 1'b1; #(T / 2.0) ref_clk = 1'b0;
    #(T / 2.0);
    check(n_up == 0 && n_dn == 0 && !up && !dn, "first reference edge must be ignored");

    for (int s = -4; s <= 4; s++) begin
      if (s == 0) continue;
      delta = 0.25 * real'(s);
      delta_r = delta;
      rst_n = 1'b0; #1 rst_n = 1'b1;
      fb_on = 1;
      n_up = 0; n_dn = 0;
      repeat (6) begin
        ref_clk = 1'b1; #(T / 2.0); ref_clk = 1'b0; #(T / 2.0);
      end
      fb_on = 0;
      #(2.0 * T);
      // six feedback edges, the last one without a reference edge to pair with
      check(n_up == 6 && n_dn == 5, $sformatf("delta %f: %0d UP and %0d DN pulses, expected 6 and 5",
                                              delta, n_up, n_dn));
      if (delta < 0.0) begin
        check(near(w_up, -delta + TRST) && near(w_dn, TRST),
              $sformatf("delta %f: UP %f DN %f", delta, w_up, w_dn));
      end else begin
        check(near(w_dn, delta + TRST) && near(w_up, TRST),
              $sformatf("delta %f: UP %f DN %f", delta, w_up, w_dn));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
