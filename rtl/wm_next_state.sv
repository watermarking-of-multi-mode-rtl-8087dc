// Watermarked state-transition function of the multi-mode counter.
//
// The original 16-state counter graph is extended with KEY_STEPS watermark
// states r1..rn, built from the signature y1..yn (package mm_counter_pkg):
//   * s'_i is the original state reached from S0 by applying y1..yi. It is
//     computed here by a chain of constant-input counter_next_state copies,
//     which synthesis folds to constants.
//   * r_i is a copy of s'_i: it stands for the same count value and has the
//     same outgoing transitions and outputs as s'_i,
//   * except that the edge of S0 under y1 goes to r1 instead of s'_1, and the
//     edge of r_i under y(i+1) goes to r(i+1) instead of s'_(i+1).
// Every r_i therefore has exactly one incoming edge and is only reached by
// applying the signature from S0; every other edge out of r_i returns to the
// original states, so the count seen outside never changes. The watermark is
// "invisible": the count value of every state matches the unwatermarked
// counter under any input sequence.
//
// Leaving r_n (whatever the input) additionally raises the output, as the
// sign for the owner that the whole signature was recognised. Codes above r_n
// (5'b10000 + KEY_STEPS .. 5'b11111) are unreachable; this design lets them
// behave like S0 (count 0, S0's edges, no watermark edge).
//
// State codes: S_k = {1'b0, k}; r_i = 5'b10000 + (i - 1), as in the paper's
// detection example. KEY_STEPS = 6 is the 18-bit signature; 2..5 give the
// 6..15-bit signatures, which are prefixes of the same word sequence.
//
// Purely combinational. value is the count represented by the present state.
module wm_next_state
  import mm_counter_pkg::*;
#(
  parameter int unsigned KEY_STEPS = 6   // signature length in control words
) (
  input  state_t state,   // present state (original or watermark)
  input  ctrl_t  ctrl,    // {counter_type, direction}
  output state_t nxt,     // next state
  output logic   out,     // Mealy output of this transition
  output value_t value,   // count value represented by the present state
  output logic   in_wm,   // present state is a watermark state r1..rn
  output logic   wm_end   // present state is r_n, the last watermark state
);

  if (KEY_STEPS < 1 || KEY_STEPS > MAX_KEY_STEPS) begin : g_bad_key
    $error("KEY_STEPS must be between 1 and %0d", MAX_KEY_STEPS);
  end

  // ---- images s'_1..s'_n of the watermark states (constants) ----
  // Eight entries so that a 3-bit watermark index always selects one; the
  // entries at and above KEY_STEPS are never used.
  ctrl_t  key   [8];
  value_t image [8];
  logic   image_out [8];   // output of the signature edges (not used)

  for (genvar i = 0; i < 8; i++) begin : g_image
    value_t from;
    assign key[i] = wm_key(i);
    if (i == 0) begin : g_first
      assign from = '0;                 // the signature starts in S0
    end else begin : g_next
      assign from = image[i-1];
    end
    counter_next_state u_step (
      .cur  (from),
      .ctrl (key[i]),
      .nxt  (image[i]),
      .out  (image_out[i])
    );
  end

  // ---- present state -> represented count ----
  state_t idx;       // watermark index: r1 -> 0
  always_comb begin
    idx   = state - WM_BASE;
    in_wm = state[STATE_W-1] && (idx < state_t'(KEY_STEPS));
    value = '0;
    if (!state[STATE_W-1])  value = state[VALUE_W-1:0];
    else if (in_wm)         value = image[idx[2:0]];
    wm_end = (state == WM_BASE + state_t'(KEY_STEPS - 1));
  end

  // ---- original transition of the represented state ----
  value_t base_nxt;
  logic   base_out;

  counter_next_state u_base (
    .cur  (value),
    .ctrl (ctrl),
    .nxt  (base_nxt),
    .out  (base_out)
  );

  // ---- watermark edges ----
  always_comb begin
    nxt = {1'b0, base_nxt};
    if (state == '0 && ctrl == key[0])
      nxt = WM_BASE;                               // S0 --y1--> r1
    else if (in_wm && idx < state_t'(KEY_STEPS - 1) && ctrl == key[idx[2:0] + 3'd1])
      nxt = state + 1'b1;                          // r_i --y(i+1)--> r(i+1)
    out = base_out | wm_end;
  end

endmodule
