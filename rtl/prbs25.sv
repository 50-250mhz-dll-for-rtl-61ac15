`timescale 1ns/1fs
// prbs25: 25-bit maximal-length pseudo-random sequence generator, the dither
// source of the delta-sigma modulator.
//
// A Fibonacci LFSR with feedback polynomial x^25 + x^22 + 1 (period 2^25 - 1).
// The register shifts towards the MSB by one place per enabled clock and the
// new LSB is state[24] ^ state[21]. The whole state is exposed; the modulator
// uses its low bits as a uniform dither word. The 25-bit length is the
// published design's; the polynomial and seed are this implementation's.
//
// Interface: clk, active-low asynchronous reset rst_n, enable en; state is
// valid from the first clock after reset and changes one cycle after en.
module prbs25 #(
  parameter logic [24:0] SEED = 25'h1A5_C3E1  // any non-zero value
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [24:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[23:0], state[24] ^ state[21]};
  end

  // The all-zero state is the lock-up state of an XOR LFSR.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
