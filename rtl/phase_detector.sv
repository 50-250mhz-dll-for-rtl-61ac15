`timescale 1ns/1fs
// phase_detector: BEHAVIOURAL MODEL of the core-loop phase detector.
//
// A three-state phase-frequency detector comparing the rising edges of the
// reference phi_ref and the dithered feedback phi_dll. An edge of phi_dll
// ahead of the reference edge means the delay line is too fast: "up" pulses,
// raising V_F and the delay. A reference edge ahead of phi_dll gives "dn".
// When both flags are set they clear after T_RST_NS (the reset path delay
// of a real detector). The first reference edge after reset is not counted:
// it is the edge that launches the first edge into the empty delay line, so
// every following reference edge is compared with the feedback edge launched
// one period earlier, which is the DLL's lock condition.
//
// The document names the phase detector but does not describe it; the
// three-state detector with the start-up rule above is this implementation's
// choice.
//
// Interface: ref_clk, fb_clk; rst_n asynchronous, active low; up and dn are
// pulses whose width is the phase difference.
module phase_detector #(
  parameter real T_RST_NS = 0.05
) (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);

  logic armed, clr, both;

  assign both = up & dn;
  assign #(T_RST_NS) clr = both;

  always @(posedge ref_clk or posedge clr or negedge rst_n) begin
    if (!rst_n) begin
      dn    <= 1'b0;
      armed <= 1'b0;
    end else if (clr)   dn    <= 1'b0;
    else if (!armed)    armed <= 1'b1;
    else                dn    <= 1'b1;
  end

  always @(posedge fb_clk or posedge clr or negedge rst_n) begin
    if (!rst_n)   up <= 1'b0;
    else if (clr) up <= 1'b0;
    else          up <= 1'b1;
  end

endmodule
