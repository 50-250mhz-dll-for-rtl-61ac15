`timescale 1ns/1fs
// tb_prbs25: checks the 25-bit PRBS against an independent model of the
// polynomial x^25 + x^22 + 1 for the first 10,000 states, checks that the
// enable holds the state, and runs the full sequence to confirm the period is
// exactly 2^25 - 1 (the seed does not recur earlier).
module tb_prbs25;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [24:0] state, model;
  int checks = 0, failures = 0;

  prbs25 dut (.clk(clk), .rst_n(rst_n), .en(en), .state(state));

  always #1 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned period;
    logic [24:0] seed;
    #0.5 rst_n = 1'b0;
    #3   rst_n = 1'b1;
    seed  = state;
    model = state;
    check(state != '0, "seed non-zero");
    // enable low: state holds
    repeat (5) @(posedge clk);
    #0.1 check(state == seed, "hold while en low");
    en = 1'b1;
    for (int i = 0; i < 10000; i++) begin
      @(posedge clk); #0.1;
      // independent model: next bit = tap 25 xor tap 22 (1-based)
      model = {model[23:0], model[24] ^ model[21]};
      check(state == model, $sformatf("state %0d", i));
    end
    // run on until the seed comes back
    period = 10000;
    while (state != seed) begin
      @(posedge clk); #0.1;
      period++;
    end
    check(period == 32'd33554431, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
