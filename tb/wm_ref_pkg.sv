// Reference models for the testbenches, written independently of the RTL.
//
// orig_step: the unwatermarked counter, with the Gray sequence kept as an
// explicit list and the BCD/binary rules written out case by case.
// wm_step:   the watermarked graph, described by (watermark index, count value)
// and built by walking the signature from S0, as the construction says.
package wm_ref_pkg;

  localparam int GRAY_SEQ [16] = '{0, 1, 3, 2, 6, 7, 5, 4, 12, 13, 15, 14, 10, 11, 9, 8};
  localparam int KEY [6] = '{'b001, 'b011, 'b101, 'b010, 'b000, 'b100};

  function automatic int gray_pos(input int v);
    for (int k = 0; k < 16; k++) if (GRAY_SEQ[k] == v) return k;
    return 0;
  endfunction

  // One step of the unwatermarked counter. ctrl = {type[1:0], up}.
  function automatic void orig_step(input int v, input int ctrl,
                                    output int nv, output bit o);
    int t;
    bit up;
    t  = (ctrl >> 1) & 3;
    up = ctrl[0];
    o  = 0;
    case (t)
      0: begin
        if (up) begin nv = (v == 15) ? 0 : v + 1;  o = (nv == 15); end
        else    begin nv = (v == 0) ? 15 : v - 1;  o = (v == 1);   end
      end
      1: begin
        int p;
        p = gray_pos(v);
        if (up) begin nv = GRAY_SEQ[(p + 1) % 16];  o = (p == 14); end
        else    begin nv = GRAY_SEQ[(p + 15) % 16]; o = (p == 1);  end
      end
      2: begin
        if (v > 9)   begin nv = 0; end
        else if (up) begin nv = (v == 9) ? 0 : v + 1; o = (v == 8); end
        else         begin nv = (v == 0) ? 9 : v - 1; o = (v == 1); end
      end
      default: nv = 0;
    endcase
  endfunction

  // Count value of watermark state r_(i+1), i = 0..n-1.
  function automatic int image(input int i);
    int v;
    bit o;
    v = 0;
    for (int k = 0; k <= i; k++) orig_step(v, KEY[k], v, o);
    return v;
  endfunction

  // Watermarked state code -> count value (n = number of watermark states).
  function automatic int wm_value(input int s, input int n);
    if (s < 16)            return s;
    if (s - 16 < n)        return image(s - 16);
    return 0;
  endfunction

  // One step of the watermarked counter: next state code and output.
  function automatic void wm_step(input int s, input int ctrl, input int n,
                                  output int ns, output bit o);
    int v, nv;
    bit is_r;
    v    = wm_value(s, n);
    is_r = (s >= 16) && (s - 16 < n);
    orig_step(v, ctrl, nv, o);
    ns = nv;
    if (s == 0 && ctrl == KEY[0])                          ns = 16;
    else if (is_r && (s - 16) < n - 1 && ctrl == KEY[s - 15]) ns = s + 1;
    if (s == 16 + n - 1) o = 1;
  endfunction

endpackage
