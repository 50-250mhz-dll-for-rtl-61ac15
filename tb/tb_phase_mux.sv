`timescale 1ns/1fs
// tb_phase_mux: exhaustive select values 0..15 against random tap patterns;
// taps 1..13 must appear at the output, other select values give 0.
module tb_phase_mux;
  logic [13:1] taps;
  logic [3:0]  sel;
  logic        out;
  int checks = 0, failures = 0;

  phase_mux dut (.taps(taps), .sel(sel), .out(out));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int r = 0; r < 200; r++) begin
      taps = 13'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        exp = (s >= 1 && s <= 13) ? taps[s] : 1'b0;
        checks++;
        if (out !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL taps=%b sel=%0d out=%b exp=%b", taps, s, out, exp);
        end
      end
    end
    // walking one: each tap reaches the output only through its own select
    for (int t = 1; t <= 13; t++) begin
      taps = 13'(1) << (t - 1);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (out !== (s == t)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
