// Next-state and output function of the original (unwatermarked) multi-mode
// counter: 16 states S0..S15 whose 4-bit codes are the count value.
//
// Binary mode steps the value by +1 / -1 modulo 16. Gray mode walks the
// reflected 4-bit Gray sequence 0,1,3,2,6,7,5,4,C,D,F,E,A,B,9,8 forward or
// backward: the code is turned into its position in the sequence, that
// position is stepped, and it is turned back into a code. BCD mode counts
// 0..9 with wrap-around; the six codes above 9 are not BCD digits and go to S0
// in either direction. Control word counter_type = 11 sends every state to S0.
//
// The output is the Mealy output of the transition: 1 when the step reaches
// the terminal count of the chosen direction: the last code of the sequence
// going up (binary F, Gray 8, BCD 9) or S0 from its predecessor going down.
// A wrap-around step (F->0 up, 0->F down) gives 0. This reproduces the
// counter's state table entry by entry; computing it from the count
// arithmetic rather than storing the table is this design's choice.
//
// Purely combinational, no clock.
module counter_next_state
  import mm_counter_pkg::*;
(
  input  value_t cur,   // present original state
  input  ctrl_t  ctrl,  // {counter_type, direction}
  output value_t nxt,   // next original state
  output logic   out    // Mealy output of this transition
);

  value_t pos;       // position of cur in the Gray sequence (Gray -> binary)
  value_t pos_nxt;
  value_t last;      // last code of the up-count sequence of the mode

  always_comb begin
    // Gray to binary: each bit is the XOR of the Gray bits at and above it.
    pos[3] = cur[3];
    pos[2] = cur[3] ^ cur[2];
    pos[1] = cur[3] ^ cur[2] ^ cur[1];
    pos[0] = cur[3] ^ cur[2] ^ cur[1] ^ cur[0];
    pos_nxt = ctrl.up ? pos + 4'd1 : pos - 4'd1;

    nxt  = '0;
    last = 4'hF;
    unique case (ctrl.ctype)
      CT_BINARY: begin
        nxt  = ctrl.up ? cur + 4'd1 : cur - 4'd1;
        last = 4'hF;
      end
      CT_GRAY: begin
        nxt  = pos_nxt ^ (pos_nxt >> 1);      // binary to Gray
        last = 4'h8;                          // Gray code of position 15
      end
      CT_BCD: begin
        last = 4'h9;
        if (cur > 4'd9)       nxt = 4'd0;
        else if (ctrl.up)     nxt = (cur == 4'd9) ? 4'd0 : cur + 4'd1;
        else                  nxt = (cur == 4'd0) ? 4'd9 : cur - 4'd1;
      end
      CT_NONE: begin
        nxt  = 4'd0;
        last = 4'hF;
      end
    endcase

    // Terminal count: up into the last code, or down into S0 from the state
    // just above it (pos == 1 in every mode: binary 1, Gray 1, BCD 1).
    if (ctrl.ctype == CT_NONE)  out = 1'b0;
    else if (ctrl.up)           out = (nxt == last);
    else                        out = (cur == 4'd1);
  end

endmodule
