`timescale 1ns/1fs
// tb_cpd: builds the coarse detector's two three-cell delay chains in the
// testbench (cell delay Td, period 10 Td) and places the rising edge of
// phi_out in each of the ten intervals A..J of phi_in (A starts at the
// falling edge of phi_in). Expected outputs, from the truth table:
//   A..D: UPDN 0, HOLD 0;  E: UPDN 0, HOLD 1;  F..J: UPDN 1, HOLD 0.
// Each interval is tried at several positions inside it.
module tb_cpd;
  localparam real TD = 0.5;
  localparam real T  = 10.0 * TD;
  logic phi_in = 1'b1, phi_out = 1'b0, rst_n = 1'b1;
  logic in_d1 = 1'b0, in_d2 = 1'b0, in_d3 = 1'b0, out_d3 = 1'b0;
  logic updn, hold;
  real  off = 0.1; // phi_out rising edge after the phi_in falling edge
  int checks = 0, failures = 0;

  // transport delays: value and delay captured when the edge enters
  real td_r = TD;
  always @(phi_in) begin
    automatic logic v = phi_in;
    automatic real  d = td_r;
    fork
      begin #(d);       in_d1 = v; end
      begin #(2.0 * d); in_d2 = v; end
      begin #(3.0 * d); in_d3 = v; end
    join_none
  end
  always @(phi_out) begin
    automatic logic v = phi_out;
    automatic real  d = td_r;
    fork begin #(3.0 * d); out_d3 = v; end join_none
  end

  cpd dut (.out_d3, .rst_n, .in_d1, .in_d2, .in_d3, .updn, .hold);

  // phi_in: falls at n*T, rises at n*T + T/2
  initial forever begin
    phi_in = 1'b0; #(T / 2.0);
    phi_in = 1'b1; #(T / 2.0);
  end
  // phi_out: rises at n*T + off, high for half a period
  always @(negedge phi_in) begin
    automatic real o = off;
    fork
      begin #(o);           phi_out = 1'b1; end
      begin #(o + T / 2.0); phi_out = 1'b0; end
    join_none
  end

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

  initial begin
    string names = "ABCDEFGHIJ";
    logic exp_updn, exp_hold;
    off = 0.2;
    rst_n = 1'b0; #1 rst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      for (int p = 1; p <= 4; p++) begin
        off = (real'(r) + 0.2 * real'(p)) * TD;
        #(4.0 * T);
        exp_updn = (r >= 5);
        exp_hold = (r == 4);
        check(updn == exp_updn && hold == exp_hold,
              $sformatf("interval %s offset %f: UPDN=%b HOLD=%b expected %b %b",
                        names.substr(r, r), off, updn, hold, exp_updn, exp_hold));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
