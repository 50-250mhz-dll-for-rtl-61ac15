`timescale 1ns/1fs
// tb_charge_pump: checks the pump model against I_CP = code/16 * K_P/2 *
// (VOV0 - V_F)^2 for every code and several V_F, the sign for UP / DN /
// both / none, and the override by UNDER (+I) and OVER (-I) whatever the
// phase detector says.
module tb_charge_pump;
  localparam real KP   = 150.0e-15 / 0.357e-9;
  localparam real VOV0 = 2.189;
  logic up = 1'b0, dn = 1'b0, under = 1'b0, over = 1'b0;
  logic [4:0] code = 5'd16;
  real vf = 1.0, i_cp;
  int checks = 0, failures = 0;

  charge_pump dut (.up, .dn, .under, .over, .code, .vf, .i_cp);

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

  function automatic bit near(real a, real b);
    real tol = 1.0e-9 * ((b < 0.0) ? -b : b) + 1.0e-15;
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    real ie, exp_i;
    for (int c = 0; c < 32; c++) begin
      for (int j = 0; j < 4; j++) begin
        code = 5'(c);
        vf = 0.3 + 0.5 * real'(j);
        ie = real'(c) / 16.0 * 0.5 * KP * (VOV0 - vf) * (VOV0 - vf);
        for (int s = 0; s < 16; s++) begin
          {under, over, up, dn} = 4'(s);
          #1;
          if (under)    exp_i = ie;
          else if (over) exp_i = -ie;
          else          exp_i = (up ? ie : 0.0) - (dn ? ie : 0.0);
          check(near(i_cp, exp_i),
                $sformatf("code %0d vf %f u/o/up/dn %b: %e A, expected %e",
                          c, vf, 4'(s), i_cp, exp_i));
        end
      end
    end
    // order of magnitude at the nominal point: tens of microamperes
    code = 5'd16; vf = 1.0; {under, over, up, dn} = 4'b0010; #1;
    check(i_cp > 100.0e-6 && i_cp < 600.0e-6, $sformatf("nominal current %e A", i_cp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
