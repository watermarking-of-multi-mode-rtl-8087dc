// Shared types and constants of the watermarked multi-mode counter.
//
// The counter is steered by a 3-bit control word {counter_type[1:0], direction}.
// counter_type selects binary (00), Gray-code (01) or BCD (10) counting; 11 is
// not a counting mode and sends the counter back to state S0. direction = 1
// counts up, 0 counts down. These encodings follow the counter's state table.
//
// The ownership signature is a sequence of up to six control words
// {001, 011, 101, 010, 000, 100} (3 bits each, so 18 signature bits at most).
// Shorter signatures (6, 9, 12 and 15 bits) are the leading 2..5 words of the
// same sequence. Watermark state r_i is encoded as 5'b10000 + (i - 1), so the
// 16 original states keep their 4-bit codes with a leading 0.
package mm_counter_pkg;

  typedef enum logic [1:0] {
    CT_BINARY = 2'b00,
    CT_GRAY   = 2'b01,
    CT_BCD    = 2'b10,
    CT_NONE   = 2'b11
  } count_type_e;

  // Control word applied on every clock: the "primary input combination".
  typedef struct packed {
    count_type_e ctype;
    logic        up;     // direction: 1 = up, 0 = down
  } ctrl_t;

  localparam int unsigned STATE_W       = 5;  // 16 original + up to 6 watermark states
  localparam int unsigned VALUE_W       = 4;  // original states S0..S15
  localparam int unsigned MAX_KEY_STEPS = 6;  // 18-bit signature

  typedef logic [STATE_W-1:0] state_t;
  typedef logic [VALUE_W-1:0] value_t;

  localparam state_t WM_BASE = 5'b10000;      // code of r1

  // Signature word i (0-based): y1..y6 = 001, 011, 101, 010, 000, 100.
  function automatic ctrl_t wm_key(input int unsigned i);
    case (i)
      0:       return ctrl_t'(3'b001);
      1:       return ctrl_t'(3'b011);
      2:       return ctrl_t'(3'b101);
      3:       return ctrl_t'(3'b010);
      4:       return ctrl_t'(3'b000);
      default: return ctrl_t'(3'b100);
    endcase
  endfunction

endpackage
