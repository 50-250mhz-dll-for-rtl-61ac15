`timescale 1ns/1fs
// ds_modulator: programmable first-order delta-sigma modulator with dither.
//
// It turns the control word K into a stream of 2-bit tap offsets y (0..3) whose
// long-run mean is 1 + K/2^m, so that the feedback tap base+y of the delay line
// has an average index N_average = base + 1 + K/2^m (9..10 for group 8..11,
// 8..9 for group 7..10). The fractional part is noise-shaped with a
// first-order transfer (1 - z^-1), and a dither whose peak is one
// quantization step, taken from a 25-bit PRBS, breaks up the idle tones a
// first-order loop would otherwise produce.
//
// Arithmetic: two's complement, DSM_W = 16 bits with K_W = 10 fraction bits
// (one quantizer step = 2^10). Each clock
//   s = x + e,   x = 1 + K/2^m,
//   y = round(s + d), limited to 0..3,  d = 2u - 1 in [-1, 1), u from the PRBS,
//   e <= s - y.
// The error e stays inside (-1.5, 1.5] whether or not the limiter acts, so the
// running sum of y never strays more than 3 from the running sum of x: the
// mean is exact. The resolution m (5..7; smaller values are raised to 5)
// keeps the top m fraction bits of K and of the dither; the lower bits stay
// zero, which is what lets a real implementation use a shorter adder at high
// clock rates.
//
// Following the published design: first order, 25-bit PRBS dither of one
// quantization step, 10-bit input, 16-bit internal width, m = 5..7, 2-bit
// output plus the tap-group select "sel". This implementation's choices: the
// offset of 1 that centres the mean inside the four levels, reading the
// dither gain as a peak of one step, the rounding quantizer with limiter and
// the register timing.
//
// Interface and timing: clocked by clk (in the system, the falling edge of the
// last tap of the selected group, so that the select changes while all four
// candidate taps are low). k, m and grp_in are sampled every clock; y and sel
// are registered outputs, updated one clock after the inputs they reflect.
module ds_modulator
  import dll_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,    // asynchronous, active low
  input  logic [K_W-1:0] k,        // control word, low m bits used
  input  logic [2:0]     m,        // resolution in bits (5..7)
  input  fb_group_e      grp_in,   // feedback tap group from the FSM
  output logic [1:0]     y,        // tap offset inside the group
  output fb_group_e      sel       // tap group, aligned with y
);

  localparam int FRAC = K_W;
  localparam logic signed [DSM_W-1:0] ONE  = DSM_W'(1) <<< FRAC;
  localparam logic signed [DSM_W-1:0] HALF = DSM_W'(1) <<< (FRAC - 1);

  logic [24:0]              prbs;
  logic [3:0]               m_eff;
  logic [K_W-1:0]           k_mask, u_mask;
  logic signed [DSM_W-1:0]  x, s, d, w, e_q, y_full;
  logic [1:0]               y_d;

  prbs25 u_prbs (.clk(clk), .rst_n(rst_n), .en(1'b1), .state(prbs));

  always_comb begin
    // clamp the resolution to the programmable range (a 3-bit m cannot
    // exceed M_MAX = 7)
    m_eff = (m < 3'(M_MIN)) ? 4'(M_MIN) : {1'b0, m};
    // keep the top m fraction bits
    u_mask = ~((K_W'(1) << (K_W - int'(m_eff))) - K_W'(1));
    k_mask = (k << (K_W - int'(m_eff))) & u_mask;

    x = ONE + DSM_W'(k_mask);
    s = x + e_q;
    d = (DSM_W'(prbs[K_W-1:0] & u_mask) <<< 1) - ONE;
    // quantize: round s + d, limited to the four taps of a group
    w = s + d + HALF;
    if (w < 0)               y_d = 2'd0;
    else if (w >= 4 * ONE)   y_d = 2'd3;
    else                     y_d = w[FRAC+1:FRAC];
    y_full = DSM_W'(y_d) <<< FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q <= '0;
      y   <= 2'd1;
      sel <= GRP_8_11;
    end else begin
      e_q <= s - y_full;
      y   <= y_d;
      sel <= grp_in;
    end
  end

  // The loop error stays inside (-1.5, 1.5] quantization steps.
  a_err_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    (e_q > -(ONE + HALF)) && (e_q <= ONE + HALF));

endmodule
