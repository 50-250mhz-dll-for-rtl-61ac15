`timescale 1ns/1fs
// tb_dll_full: the synchronizer with every parameter at its default, at the
// four operating points of the published measurements: 50 MHz with m = 7,
// 100 MHz with m = 6, 200 MHz and 250 MHz with m = 5. Each runs from reset
// through core lock to one complete synchronization (coarse search,
// successive approximation and, where it applies, the group switch) and
// checks the result against the period alone (see dll_sync_run). The fine
// step of every run must be in the tens of picoseconds, the published
// resolution being about 15 ps.
module tb_dll_full;
  bit  done [4];
  int  c [4], f [4];
  real step [4], e [4];
  int checks = 0, failures = 0;

  dll_sync_run #(.T_NS(20.0), .M(7), .P_IN_FRAC(0.37), .T_CORE_NS(300_000.0), .T_SETTLE_NS(1_000_000.0)) r50
    (.done(done[0]), .checks(c[0]), .failures(f[0]), .fine_step_ps(step[0]), .err_ps(e[0]));
  dll_sync_run #(.T_NS(10.0), .M(6), .P_IN_FRAC(0.81), .T_CORE_NS(150_000.0), .T_SETTLE_NS(400_000.0)) r100
    (.done(done[1]), .checks(c[1]), .failures(f[1]), .fine_step_ps(step[1]), .err_ps(e[1]));
  dll_sync_run #(.T_NS(5.0),  .M(5), .P_IN_FRAC(0.52), .T_CORE_NS(100_000.0)) r200
    (.done(done[2]), .checks(c[2]), .failures(f[2]), .fine_step_ps(step[2]), .err_ps(e[2]));
  dll_sync_run #(.T_NS(4.0),  .M(5), .P_IN_FRAC(0.13), .T_CORE_NS(100_000.0)) r250
    (.done(done[3]), .checks(c[3]), .failures(f[3]), .fine_step_ps(step[3]), .err_ps(e[3]));

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      if (!(step[i] > 1.0 && step[i] < 60.0)) begin
        failures++;
        $display("FAIL run %0d: fine step %f ps", i, step[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
