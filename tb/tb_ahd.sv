`timescale 1ns/1fs
// tb_ahd: drives the anti-harmonic detector with a 50% reference of period T
// and a feedback clock that is the same reference delayed by D, starting
// from an empty line after reset, for D across 0.2T..1.9T. Expected, from the
// edge positions alone:
//   D < 0.5T        : UNDER pulses of width 0.5T - D every period, no OVER
//   0.5T < D < 1.5T : neither flag
//   D > 1.5T        : OVER pulses of width D - 1.5T every period, no UNDER
module tb_ahd;
  localparam real T = 10.0;
  logic ref_src = 1'b0, gate = 1'b0, rst_n = 1'b1;
  logic phi_ref, phi_dll, under, over;
  real  dly = 1.0;
  int checks = 0, failures = 0;

  assign phi_ref = ref_src & gate;
  always #(T / 2.0) ref_src = ~ref_src;
  // transport delay of the gated reference = feedback clock
  logic fb = 1'b0;
  always @(phi_ref) begin
    automatic logic v = phi_ref;
    automatic real  d = dly;
    fork begin #(d); fb = v; end join_none
  end
  assign phi_dll = fb;

  ahd dut (.phi_ref(phi_ref), .phi_dll(phi_dll), .rst_n(rst_n), .under(under), .over(over));

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

  // pulse statistics over a measurement window
  int  n_under, n_over;
  real w_under, w_over, t_u, t_o;
  bit  measuring = 0;
  always @(posedge under) if (measuring) begin n_under++; t_u = $realtime; end
  always @(negedge under) if (measuring && n_under > 0) w_under = $realtime - t_u;
  always @(posedge over)  if (measuring) begin n_over++;  t_o = $realtime; end
  always @(negedge over)  if (measuring && n_over > 0)  w_over  = $realtime - t_o;

  task automatic scenario(real frac);
    real exp_w;
    // empty the line, reset, start on a reference falling edge
    gate = 1'b0;
    dly  = frac * T;
    #(3.0 * T);
    rst_n = 1'b0; #1 rst_n = 1'b1;
    @(negedge ref_src); gate = 1'b1;
    #(5.0 * T);
    n_under = 0; n_over = 0; w_under = 0.0; w_over = 0.0;
    measuring = 1;
    #(20.0 * T);
    measuring = 0;
    if (frac < 0.5) begin
      exp_w = (0.5 - frac) * T;
      check(n_under >= 19 && n_under <= 21, $sformatf("D=%0.2fT UNDER count %0d", frac, n_under));
      check(n_over == 0, $sformatf("D=%0.2fT spurious OVER %0d", frac, n_over));
      check(w_under > exp_w - 0.01 && w_under < exp_w + 0.01,
            $sformatf("D=%0.2fT UNDER width %f exp %f", frac, w_under, exp_w));
    end else if (frac > 1.5) begin
      exp_w = (frac - 1.5) * T;
      check(n_over >= 19 && n_over <= 21, $sformatf("D=%0.2fT OVER count %0d", frac, n_over));
      check(n_under == 0, $sformatf("D=%0.2fT spurious UNDER %0d", frac, n_under));
      check(w_over > exp_w - 0.01 && w_over < exp_w + 0.01,
            $sformatf("D=%0.2fT OVER width %f exp %f", frac, w_over, exp_w));
    end else begin
      check(n_under == 0 && n_over == 0,
            $sformatf("D=%0.2fT in lock range: UNDER %0d OVER %0d", frac, n_under, n_over));
    end
  endtask

  initial begin
    rst_n = 1'b0; #1 rst_n = 1'b1;
    scenario(0.20);
    scenario(0.35);
    scenario(0.45);
    scenario(0.55);
    scenario(0.80);
    scenario(1.00);
    scenario(1.20);
    scenario(1.45);
    scenario(1.55);
    scenario(1.70);
    scenario(1.90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
