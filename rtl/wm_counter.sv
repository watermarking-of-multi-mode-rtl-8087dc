// Watermarked multi-mode counter (top level).
//
// A synchronous 4-bit counter that counts in binary, Gray code or BCD, up or
// down, chosen on every clock by counter_type and direction. Hidden in its
// state graph is an ownership watermark: KEY_STEPS extra states that only the
// signature sequence of control words reaches (see wm_next_state). To check a
// part for the watermark, reset it, hold enable high and apply the signature
// one word per clock; the state then walks S0, r1, ..., rn, and counter_output
// goes high for one cycle on the clock edge after rn was reached. Under any
// other input the count value is the same as in the unwatermarked counter.
//
// Timing: one transition per rising clk edge. reset is synchronous and wins
// over everything: state S0, output 0. With enable low the state and output
// hold. Otherwise the state takes the next-state value and counter_output
// registers the transition's output, so counter_output is 1 during the cycle
// after a terminal-count transition (binary F, Gray 8, BCD 9 going up; S0 from
// S1 going down). Registering the output and making it hold while disabled
// are this design's choices; the counting modes, reset, enable, state codes
// and signature follow the paper.
//
// counter_state is the raw 5-bit state (r_i shows as 10h + i - 1); count is
// the count value it stands for, which is what a user of the counter sees.
module wm_counter
  import mm_counter_pkg::*;
#(
  parameter int unsigned KEY_STEPS = 6   // 6 words = 18-bit signature
) (
  input  logic                clk,
  input  logic                reset,          // synchronous, active high
  input  logic                enable,         // count enable
  input  logic                direction,      // 1 = up, 0 = down
  input  logic [1:0]          counter_type,   // 00 binary, 01 Gray, 10 BCD
  output logic [STATE_W-1:0]  counter_state,  // raw state code
  output logic [VALUE_W-1:0]  count,          // count value of the state
  output logic                counter_output, // terminal count / watermark end
  output logic                wm_state        // present state is a watermark state
);

  ctrl_t  ctrl;
  state_t state_q, state_d;
  logic   out_d, out_q;
  value_t value;
  logic   wm_end;

  assign ctrl = '{ctype: count_type_e'(counter_type), up: direction};

  wm_next_state #(.KEY_STEPS(KEY_STEPS)) u_next (
    .state  (state_q),
    .ctrl   (ctrl),
    .nxt    (state_d),
    .out    (out_d),
    .value  (value),
    .in_wm  (wm_state),
    .wm_end (wm_end)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= '0;
      out_q   <= 1'b0;
    end else if (enable) begin
      state_q <= state_d;
      out_q   <= out_d;
    end
  end

  assign counter_state  = state_q;
  assign count          = value;
  assign counter_output = out_q;

  // The last watermark state is always left by the next enabled clock and can
  // only be entered from its predecessor.
  a_wm_end_left: assert property (@(posedge clk) disable iff (reset)
                                  (wm_end && enable) |=> !wm_end);

endmodule
