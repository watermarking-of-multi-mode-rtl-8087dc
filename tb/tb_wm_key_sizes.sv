// Testbench of the five signature sizes the watermarked counter is built
// with: 6, 9, 12, 15 and 18 bits (KEY_STEPS = 2..6). The five counters share
// their inputs; each is compared every clock with the reference model of its
// own size.
//   1. For each size n: reset, apply the first n signature words, then one
//      more word. The counter of size n must walk 00,10,..,0F+n and raise
//      counter_output on the next edge; the larger ones must not.
//   2. All 4096 sequences of four control words are applied from reset. For
//      each size, a sequence must reach the last watermark state exactly when
//      it holds the whole signature, applied at a point where the count of
//      the unwatermarked counter is 0 (the graph's S0).
//   3. 4000 clocks of random control words.
module tb_wm_key_sizes;
  import mm_counter_pkg::*;
  import wm_ref_pkg::*;

  localparam int NMIN = 2;
  localparam int NMAX = 6;

  logic       clk;
  logic       reset, enable, direction;
  logic [1:0] counter_type;
  logic [4:0] counter_state  [NMIN:NMAX];
  logic [3:0] count          [NMIN:NMAX];
  logic       counter_output [NMIN:NMAX];
  logic       wm_state       [NMIN:NMAX];

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_size
    wm_counter #(.KEY_STEPS(n)) dut (
      .clk, .reset, .enable, .direction, .counter_type,
      .counter_state (counter_state[n]),
      .count         (count[n]),
      .counter_output(counter_output[n]),
      .wm_state      (wm_state[n])
    );
  end

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int ref_s [NMIN:NMAX];
  bit ref_o [NMIN:NMAX];
  int hits  [NMIN:NMAX];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic step(input bit rst, input int ctrl);
    int ns;
    bit o;
    @(negedge clk);
    reset        = rst;
    enable       = 1'b1;
    counter_type = 2'(ctrl >> 1);
    direction    = ctrl[0];
    for (int n = NMIN; n <= NMAX; n++) begin
      if (rst) begin
        ref_s[n] = 0; ref_o[n] = 0;
      end else begin
        wm_step(ref_s[n], ctrl, n, ns, o);
        ref_s[n] = ns; ref_o[n] = o;
      end
    end
    @(posedge clk);
    #1;
    for (int n = NMIN; n <= NMAX; n++) begin
      check(counter_state[n] == 5'(ref_s[n]) && counter_output[n] == ref_o[n] &&
            count[n] == 4'(wm_value(ref_s[n], n)),
            $sformatf("size %0d: state %02h/%0b expected %02h/%0b",
                      n * 3, counter_state[n], counter_output[n], ref_s[n], ref_o[n]));
      if (ref_s[n] == 16 + n - 1) hits[n]++;
    end
  endtask

  initial clk = 1'b0;

  initial begin
    reset = 1; enable = 1; direction = 0; counter_type = 0;
    for (int n = NMIN; n <= NMAX; n++) hits[n] = 0;

    // 1. detection for each size
    for (int n = NMIN; n <= NMAX; n++) begin
      step(1, 0);
      for (int i = 0; i < n; i++) begin
        step(0, KEY[i]);
        check(counter_state[n] == 5'(16 + i), $sformatf("size %0d: word %0d not on the watermark path", n * 3, i + 1));
      end
      step(0, 'b111);
      for (int m = NMIN; m <= NMAX; m++)
        check(counter_output[m] == (m == n),
              $sformatf("size %0d: end pulse %0b after a %0d-word signature", m * 3, counter_output[m], n));
    end

    // 2. all sequences of four control words
    for (int n = NMIN; n <= NMAX; n++) hits[n] = 0;
    for (int seq = 0; seq < 4096; seq++) begin
      int  w [4];
      int  v [5];
      int  prev_hits [NMIN:NMAX];
      bit  o;
      for (int k = 0; k < 4; k++) w[k] = (seq >> (3 * (3 - k))) & 7;
      // Unwatermarked counts along the sequence: the signature can only start
      // where the count is 0 (no watermark state stands for count 0).
      v[0] = 0;
      for (int k = 0; k < 4; k++) orig_step(v[k], w[k], v[k + 1], o);
      step(1, 0);
      for (int n = NMIN; n <= NMAX; n++) prev_hits[n] = hits[n];
      for (int k = 0; k < 4; k++) step(0, w[k]);
      for (int n = NMIN; n <= NMAX; n++) begin
        bit expect_hit, got_hit;
        expect_hit = 0;
        for (int st = 0; st + n <= 4; st++) begin
          bit match;
          match = (v[st] == 0);
          for (int i = 0; i < n; i++) if (w[st + i] != KEY[i]) match = 0;
          if (match) expect_hit = 1;
        end
        got_hit = (hits[n] != prev_hits[n]);
        check(got_hit == expect_hit,
              $sformatf("size %0d: sequence %03o reaches r%0d = %0b, expected %0b",
                        n * 3, seq, n, got_hit, expect_hit));
        hits[n] = prev_hits[n] + int'(got_hit);
      end
    end
    for (int n = NMIN; n <= NMAX; n++)
      $display("size %0d bits: %0d of 4096 four-word sequences reach the last watermark state",
               n * 3, hits[n]);
    check(hits[4] == 1 && hits[5] == 0 && hits[6] == 0,
          "only the 12-bit signature itself may reach r4 in four words");

    // 3. random traffic
    for (int k = 0; k < 4000; k++)
      step($urandom_range(0, 49) == 0, $urandom_range(0, 7));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
