`timescale 1ns/1fs
// sync_fsm: clock synchronization controller (coarse and fine tuning).
//
// Once the core DLL has locked (start high), the controller moves the output
// phase phi_out onto the incoming clock phi_in in two steps.
//
// Coarse tuning: phi_out starts at tap 8. At each decision the coarse phase
// detector reports HOLD (phi_out lies within one cell delay before the rising
// edge of phi_in) or, if not, UPDN: 1 selects the adjacent earlier tap, 0 the
// adjacent later tap. Taps run 4..13 and wrap around (13 <-> 4), since with
// N_average near 10 tap 13 is one cell delay earlier than tap 4 modulo Tclk.
// During coarse tuning K is all ones and the feedback group is 8..11, i.e.
// N_average is just under 10 and the cell delay is at its smallest.
//
// Fine tuning: successive approximation on the m-bit word K, MSB first. Each
// bit is inverted (1 -> 0, which lowers N_average, lengthens the cell delay
// and moves phi_out later); after one decision interval the inversion is kept
// if HOLD is still 1, otherwise phi_out has moved past the edge of phi_in
// into interval F and the bit is restored. After m decisions phi_out sits
// within one fine step before the edge of phi_in. If every inversion was kept
// (K = 0 with group 8..11, N_average = 9) phi_out can move further: the
// feedback group switches to 7..10 with K all ones (N_average just under 9),
// HOLD is checked once more, and the search repeats over that group. If HOLD
// is lost right after the switch, the switch is undone.
//
// Revalidation: after REVAL_TICKS decisions in the locked state the
// controller presets K and the group again and repeats coarse and fine
// tuning, so a drift of phi_in is followed.
//
// Timing: clocked by the reference clock. A decision is taken every
// decision_div + 1 clocks (the programmable divider that sets the pace of the
// outer loop; it must be long against the settling time of the core loop).
// hold_a and updn_a come from the coarse phase detector's clock domain and
// are synchronized with two flip-flops each. start low returns to ST_IDLE.
//
// Following the published design: start at tap 8, the UPDN/HOLD rules, SA
// from the MSB with keep-unless-interval-F, the group switch 8..11 -> 7..10,
// periodic revalidation and a programmable decision interval. This
// implementation's choices: the wrap-around of the tap, the HOLD check after
// the group switch, the revalidation count, the state encoding and the
// synchronizers.
module sync_fsm
  import dll_pkg::*;
#(
  parameter int unsigned REVAL_TICKS = 32   // decisions between revalidations
) (
  input  logic             clk,           // reference clock
  input  logic             rst_n,         // asynchronous, active low
  input  logic             start,         // enable coarse/fine tuning
  input  logic [2:0]       m,             // resolution of K (5..7)
  input  logic [15:0]      decision_div,  // clocks per decision, minus 1
  input  logic             hold_a,        // from the CPD, asynchronous
  input  logic             updn_a,        // from the CPD, asynchronous
  output logic [K_W-1:0]   k,             // modulator control word
  output fb_group_e        grp,           // feedback tap group
  output logic [TAP_W-1:0] out_tap,       // output phase tap (4..13)
  output logic             locked,        // synchronization complete
  output sync_state_e      state
);

  // ---- synchronizers ----
  logic [1:0] hold_s, updn_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_s <= '0;
      updn_s <= '0;
    end else begin
      hold_s <= {hold_s[0], hold_a};
      updn_s <= {updn_s[0], updn_a};
    end
  end
  logic hold, updn;
  assign hold = hold_s[1];
  assign updn = updn_s[1];

  // ---- decision divider ----
  logic [15:0] div_cnt;
  logic        tick;
  assign tick = (div_cnt == '0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        div_cnt <= '0;
    else if (tick || state == ST_IDLE) div_cnt <= decision_div;
    else                               div_cnt <= div_cnt - 16'd1;
  end

  // ---- controller ----
  logic [3:0]     m_q;        // resolution latched at start
  logic [3:0]     bit_q;      // bit of K under test
  logic [31:0]    reval_cnt;
  logic [K_W-1:0] k_ones;

  logic [3:0] m_clamped;
  // a 3-bit m cannot exceed M_MAX = 7
  assign m_clamped = (m < 3'(M_MIN)) ? 4'(M_MIN) : {1'b0, m};
  assign k_ones = (K_W'(1) << m_q) - K_W'(1);

  function automatic logic [TAP_W-1:0] tap_earlier(logic [TAP_W-1:0] t);
    return (t <= TAP_W'(OUT_TAP_FIRST)) ? TAP_W'(OUT_TAP_LAST) : t - TAP_W'(1);
  endfunction
  function automatic logic [TAP_W-1:0] tap_later(logic [TAP_W-1:0] t);
    return (t >= TAP_W'(OUT_TAP_LAST)) ? TAP_W'(OUT_TAP_FIRST) : t + TAP_W'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      m_q       <= 4'(M_MIN);
      bit_q     <= '0;
      k         <= '0;
      grp       <= GRP_8_11;
      out_tap   <= TAP_W'(OUT_TAP_INIT);
      reval_cnt <= '0;
    end else if (!start) begin
      state     <= ST_IDLE;
      m_q       <= m_clamped;
      k         <= (K_W'(1) << m_clamped) - K_W'(1);
      grp       <= GRP_8_11;
      out_tap   <= TAP_W'(OUT_TAP_INIT);
      reval_cnt <= '0;
    end else begin
      unique case (state)
        ST_IDLE: state <= ST_COARSE;

        ST_COARSE:
          if (tick) begin
            if (hold) begin
              bit_q    <= m_q - 4'd1;
              k[m_q-1] <= 1'b0;
              state    <= ST_FINE_TRY;
            end else if (updn) begin
              out_tap  <= tap_earlier(out_tap);
            end else begin
              out_tap  <= tap_later(out_tap);
            end
          end

        ST_FINE_TRY:
          if (tick) begin
            if (!hold) k[bit_q] <= 1'b1;            // moved into F: restore
            if (bit_q != 4'd0) begin
              bit_q        <= bit_q - 4'd1;
              k[bit_q-1]   <= 1'b0;                 // try the next bit
            end else if (hold && grp == GRP_8_11 &&
                         (k & ~(K_W'(1))) == '0) begin
              // every inversion kept: K = 0 and still before phi_in
              grp   <= GRP_7_10;
              k     <= k_ones;
              state <= ST_GRP_CHECK;
            end else begin
              reval_cnt <= '0;
              state     <= ST_LOCKED;
            end
          end

        ST_GRP_CHECK:
          if (tick) begin
            if (hold) begin
              bit_q    <= m_q - 4'd1;
              k[m_q-1] <= 1'b0;
              state    <= ST_FINE_TRY;
            end else begin                          // overshot: undo the switch
              grp       <= GRP_8_11;
              k         <= '0;
              reval_cnt <= '0;
              state     <= ST_LOCKED;
            end
          end

        ST_LOCKED:
          if (tick) begin
            if (reval_cnt >= REVAL_TICKS - 1) begin
              k       <= k_ones;
              grp     <= GRP_8_11;
              state   <= ST_COARSE;
            end else begin
              reval_cnt <= reval_cnt + 32'd1;
            end
          end

        default: state <= ST_IDLE;
      endcase
    end
  end

  assign locked = (state == ST_LOCKED);

  a_tap_range: assert property (@(posedge clk) disable iff (!rst_n)
    (out_tap >= TAP_W'(OUT_TAP_FIRST)) && (out_tap <= TAP_W'(OUT_TAP_LAST)));

endmodule
