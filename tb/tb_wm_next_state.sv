// Self-checking testbench of wm_next_state for every signature length
// (KEY_STEPS = 1..6, i.e. 3..18 signature bits). For each instance all 32
// state codes under all 8 control words are compared with the reference
// model in wm_ref_pkg (next state, output, count value, watermark flags).
// It then checks the properties the watermark relies on, counted over the
// whole transition table of the instance:
//   * each watermark state r_i has exactly one incoming edge, from S0 (i = 1)
//     or r_(i-1), under signature word y_i;
//   * every edge of r_i leads to the same count value, with the same output,
//     as the same input does from the original state r_i stands for.
module tb_wm_next_state;
  import mm_counter_pkg::*;
  import wm_ref_pkg::*;

  localparam int NK = 6;

  state_t state;
  ctrl_t  ctrl;
  state_t nxt    [1:NK];
  logic   out    [1:NK];
  value_t value  [1:NK];
  logic   in_wm  [1:NK];
  logic   wm_end [1:NK];

  int checks = 0;
  int failures = 0;

  for (genvar n = 1; n <= NK; n++) begin : g_dut
    wm_next_state #(.KEY_STEPS(n)) dut (
      .state (state), .ctrl (ctrl), .nxt (nxt[n]), .out (out[n]),
      .value (value[n]), .in_wm (in_wm[n]), .wm_end (wm_end[n])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int ns, nv2;
    bit o, o2;
    int incoming [NK][32];   // [watermark index][source state] -> edge count

    for (int n = 1; n <= NK; n++) begin
      foreach (incoming[i, j]) incoming[i][j] = 0;
      for (int s = 0; s < 32; s++) begin
        for (int c = 0; c < 8; c++) begin
          state = state_t'(s);
          ctrl  = ctrl_t'(c);
          #1;
          wm_step(s, c, n, ns, o);
          check(nxt[n] == state_t'(ns) && out[n] == o,
                $sformatf("n=%0d s=%02h ctrl=%03b: next %02h/%0b expected %02h/%0b",
                          n, s, c, nxt[n], out[n], ns, o));
          check(value[n] == value_t'(wm_value(s, n)),
                $sformatf("n=%0d s=%02h: value %0d expected %0d", n, s, value[n], wm_value(s, n)));
          check(in_wm[n] == (s >= 16 && s < 16 + n) && wm_end[n] == (s == 16 + n - 1),
                $sformatf("n=%0d s=%02h: watermark flags %0b%0b", n, s, in_wm[n], wm_end[n]));
          if (nxt[n] >= 16 && nxt[n] < state_t'(16 + n))
            incoming[nxt[n] - 16][s]++;
          // Invisibility: the count reached equals the original counter's.
          if (s < 16 + n) begin
            orig_step(wm_value(s, n), c, nv2, o2);
            check(value_t'(wm_value(int'(nxt[n]), n)) == value_t'(nv2) &&
                  (out[n] == o2 || s == 16 + n - 1),
                  $sformatf("n=%0d s=%02h ctrl=%03b: count not preserved", n, s, c));
          end
        end
      end
      for (int i = 0; i < n; i++) begin
        int total, src;
        total = 0;
        src   = (i == 0) ? 0 : 16 + i - 1;
        for (int j = 0; j < 32; j++) total += incoming[i][j];
        check(total == 1 && incoming[i][src] == 1,
              $sformatf("n=%0d r%0d has %0d incoming edges", n, i + 1, total));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
