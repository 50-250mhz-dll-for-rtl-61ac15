`timescale 1ns/1fs
// tb_vcdl: checks the delay-line model.
//  - the cell delay against the published simulated curve: about 0.3 ns at
//    V_F = 1.0 V and 4 ns at 2.1 V (within 10 %), and growing with V_F;
//  - every tap k delays both edges of the input by k * Td;
//  - an edge already in the line keeps the delay it entered with when V_F
//    steps, and the line starts empty.
module tb_vcdl;
  import dll_pkg::*;
  logic clk_in = 1'b0;
  real  vf = 1.0;
  logic [NUM_CELLS:1] taps;
  real  td_ns;
  int checks = 0, failures = 0;

  vcdl dut (.clk_in, .vf, .taps, .td_ns);

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

  // arrival time of the last edge at every tap
  real t_arr [NUM_CELLS:1];
  logic [NUM_CELLS:1] taps_prev = '0;
  always @(taps) begin
    for (int i = 1; i <= NUM_CELLS; i++)
      if (taps[i] != taps_prev[i]) t_arr[i] = $realtime;
    taps_prev = taps;
  end

  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    real t0, prev, td;
    #0.1;
    check(taps == '0, "line starts empty");

    vf = 1.0; #0.1;
    check(near(td_ns, 0.3, 0.03), $sformatf("Td at 1.0 V = %f ns, expected about 0.3", td_ns));
    vf = 2.1; #0.1;
    check(near(td_ns, 4.0, 0.4), $sformatf("Td at 2.1 V = %f ns, expected about 4", td_ns));
    prev = 0.0;
    for (int i = 5; i <= 21; i++) begin
      vf = 0.1 * real'(i); #0.1;
      check(td_ns > prev, $sformatf("Td not increasing at %f V", vf));
      prev = td_ns;
    end

    // both edges at every tap, several control voltages
    foreach (t_arr[i]) t_arr[i] = -1.0;
    for (int j = 0; j < 5; j++) begin
      vf = 0.4 + 0.35 * real'(j); #0.1;
      td = td_ns;
      #(20.0 * td);
      t0 = $realtime; clk_in = 1'b1;
      #(15.0 * td);
      for (int i = 1; i <= NUM_CELLS; i++)
        check(near(t_arr[i] - t0, real'(i) * td, 1.0e-5) && taps[i],
              $sformatf("rise at tap %0d: %f ns, expected %f", i, t_arr[i] - t0, real'(i) * td));
      t0 = $realtime; clk_in = 1'b0;
      #(15.0 * td);
      for (int i = 1; i <= NUM_CELLS; i++)
        check(near(t_arr[i] - t0, real'(i) * td, 1.0e-5) && !taps[i],
              $sformatf("fall at tap %0d: %f ns, expected %f", i, t_arr[i] - t0, real'(i) * td));
    end

    // an edge travelling through a cell keeps its delay when V_F steps
    vf = 1.0; #0.1;
    td = td_ns;
    #(20.0 * td);
    t0 = $realtime; clk_in = 1'b1;
    #(0.5 * td);
    vf = 1.8;       // cell 1 was entered at the old delay
    #20;
    check(near(t_arr[1] - t0, td, 1.0e-5),
          $sformatf("tap 1 after a V_F step: %f ns, expected %f", t_arr[1] - t0, td));
    check(near(t_arr[2] - t_arr[1], td_ns, 1.0e-5),
          $sformatf("tap 2 after a V_F step: %f ns, expected %f", t_arr[2] - t_arr[1], td_ns));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
