`timescale 1ns/1fs
// tb_ds_modulator: for resolutions m = 5, 6, 7 (and an out-of-range m = 3,
// which must behave as m = 5) and a set of control words K, runs the
// modulator and checks
//   - the running sum of y stays within 3 of n*(1 + K/2^m), the bound a
//     first-order loop guarantees (its error stays within 1.5 steps at either
//     end of the run),
//   - y is dithered: it takes at least three of the four values, also when
//     K/2^m is 0 or 1/2, where an undithered first-order loop would sit at one
//     or two levels,
//   - sel follows grp_in one clock later.
module tb_ds_modulator;
  import dll_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b1;
  logic [K_W-1:0]  k;
  logic [2:0]      m;
  fb_group_e       grp_in, sel;
  logic [1:0]      y;
  int checks = 0, failures = 0;

  ds_modulator dut (.clk, .rst_n, .k, .m, .grp_in, .y, .sel);

  always #2 clk = ~clk;

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

  task automatic run(int mm, int kk, int n);
    real    target, sum, dev, maxdev;
    int     mref;
    bit     seen[4];
    int     nseen;
    mref   = (mm < 5) ? 5 : mm;
    m      = 3'(mm);
    k      = K_W'(kk);
    grp_in = GRP_8_11;
    // let the new word enter the loop, then start counting
    repeat (4) @(posedge clk);
    #0.1;
    sum = 0.0; maxdev = 0.0;
    foreach (seen[i]) seen[i] = 0;
    target = 1.0 + real'(kk % (1 << mref)) / real'(1 << mref);
    for (int i = 1; i <= n; i++) begin
      @(posedge clk); #0.1;
      sum += real'(y);
      seen[y] = 1;
      dev = sum - real'(i) * target;
      if (dev < 0) dev = -dev;
      if (dev > maxdev) maxdev = dev;
    end
    check(maxdev < 3.01, $sformatf("m=%0d K=%0d running-sum deviation %f", mm, kk, maxdev));
    nseen = 0;
    foreach (seen[i]) nseen += int'(seen[i]);
    check(nseen >= 3, $sformatf("m=%0d K=%0d dither: only %0d levels", mm, kk, nseen));
  endtask

  initial begin
    k = '0; m = 3'd5; grp_in = GRP_8_11;
    #0.5 rst_n = 1'b0;
    #5   rst_n = 1'b1;
    run(5, 0, 4000);
    run(5, 31, 4000);
    run(5, 16, 4000);
    run(5, 7, 4000);
    run(6, 0, 4000);
    run(6, 45, 4000);
    run(6, 63, 4000);
    run(7, 1, 8000);
    run(7, 64, 4000);
    run(7, 100, 4000);
    run(7, 127, 4000);
    run(3, 19, 4000);      // clamped to m = 5
    run(5, 1023, 4000);    // bits above m ignored: K = 31
    for (int r = 0; r < 6; r++) run(5 + r % 3, int'($urandom_range(0, 127)), 3000);
    // group select is carried with one clock of latency
    @(posedge clk); #0.1 grp_in = GRP_7_10;
    @(posedge clk); #0.1 check(sel == GRP_7_10, "sel follows grp_in (7..10)");
    grp_in = GRP_8_11;
    check(sel == GRP_7_10, "sel registered");
    @(posedge clk); #0.1 check(sel == GRP_8_11, "sel follows grp_in (8..11)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
