`timescale 1ns/1fs
// phase_mux: 13-to-1 multiplexer for delay-line phases.
//
// The same multiplexer is used everywhere a phase is picked from the delay
// line: for the dithered feedback phase (taps 7..11 used), for the output
// phase (taps 4..13 used), for the matching copy in the reference input path
// and for the modulator clock. Using one identical cell for all of them gives
// every delay tap the same load and puts the same multiplexer delay in the
// reference and feedback paths, so that delay cancels out of the lock
// condition. The identical 13-input multiplexers are the published design's;
// the tap numbering is this implementation's.
//
// Interface: taps[k] is tap k (k = 1..N); sel is the tap number; out is the
// selected phase, or 0 when sel is outside 1..N. Purely
// combinational.
module phase_mux
  import dll_pkg::*;
#(
  parameter int N = NUM_CELLS
) (
  input  logic [N:1]       taps,
  input  logic [TAP_W-1:0] sel,
  output logic             out
);

  always_comb begin
    out = 1'b0;
    for (int i = 1; i <= N; i++)
      if (int'(sel) == i) out = taps[i];
  end

endmodule
