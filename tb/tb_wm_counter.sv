// End-to-end testbench of the watermarked multi-mode counter at its default
// size (18-bit signature, six watermark states).
//
// Every clock, the raw state, the count value and the output are compared
// with two reference models from wm_ref_pkg: the watermarked graph (exact
// state codes) and the unwatermarked counter (count and output must agree,
// apart from the one output pulse that marks the end of the signature).
// Directed phases:
//   1. watermark detection: reset, then the signature 001 011 101 010 000 100;
//      the state must walk 00,10,11,12,13,14,15 and counter_output must rise
//      on exactly the first clock edge after state 15h was reached;
//   2. each counting mode up and down from reset for 20 clocks (binary up
//      must pass through r1, code 10h, in place of S1);
//   3. an interrupted signature, count enable low, invalid mode, reset;
//   4. 20000 clocks of random control words, biased toward the next
//      signature word so that partial and complete signatures recur.
// Each mechanism (mode/direction steps, terminal counts, wrap-arounds,
// watermark entry, abort and completion, holds, resets, invalid mode) is
// counted; one that never happened counts as a failure.
module tb_wm_counter;
  import mm_counter_pkg::*;
  import wm_ref_pkg::*;

  localparam int N = 6;   // watermark states of the default configuration

  logic       clk = 1'b0;
  logic       reset, enable, direction;
  logic [1:0] counter_type;
  logic [4:0] counter_state;
  logic [3:0] count;
  logic       counter_output, wm_state;

  wm_counter dut (
    .clk, .reset, .enable, .direction, .counter_type,
    .counter_state, .count, .counter_output, .wm_state
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  // reference state
  int  ref_s = 0;      // watermarked state code
  bit  ref_o = 0;
  int  orig_v = 0;     // unwatermarked count
  bit  orig_o = 0;
  bit  end_pulse = 0;  // output comes from leaving r_n

  // mechanism counters
  int n_mode [8];          // enabled steps per control word
  int n_tc [3];            // terminal-count outputs per mode
  int n_wrap = 0, n_enter = 0, n_abort = 0, n_complete = 0;
  int n_hold = 0, n_reset = 0, n_invalid = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  // Apply one set of inputs for one clock and check the result.
  task automatic step(input bit rst, input bit en, input int ctrl);
    int ns, nv;
    bit o, o2;
    @(negedge clk);
    reset        = rst;
    enable       = en;
    counter_type = 2'(ctrl >> 1);
    direction    = ctrl[0];
    // reference update for the coming edge (the output holds while disabled)
    if (rst) begin
      ref_s = 0; ref_o = 0; orig_v = 0; orig_o = 0; end_pulse = 0;
      n_reset++;
    end else if (!en) begin
      n_hold++;
    end else begin
      wm_step(ref_s, ctrl, N, ns, o);
      orig_step(orig_v, ctrl, nv, o2);
      n_mode[ctrl]++;
      if (ctrl >= 6) n_invalid++;
      if (o2) n_tc[ctrl >> 1]++;
      if (nv == 0 && orig_v == 15 && ctrl == 1) n_wrap++;
      if (nv == 15 && orig_v == 0 && ctrl == 0) n_wrap++;
      if (ref_s == 0 && ns == 16) n_enter++;
      if (ref_s >= 16 && ref_s < 16 + N - 1 && ns < 16) n_abort++;
      if (ref_s == 16 + N - 1) begin n_complete++; end_pulse = 1; end
      else end_pulse = 0;
      ref_s = ns; ref_o = o; orig_v = nv; orig_o = o2;
    end
    @(posedge clk);
    #1;
    cycles++;
    check(counter_state == 5'(ref_s) && counter_output == ref_o,
          $sformatf("state %02h/%0b expected %02h/%0b", counter_state, counter_output, ref_s, ref_o));
    check(count == 4'(orig_v) &&
          (counter_output == orig_o || (end_pulse && counter_output)),
          $sformatf("count %0d/%0b differs from unwatermarked counter %0d/%0b",
                    count, counter_output, orig_v, orig_o));
    check(wm_state == (ref_s >= 16), "wm_state flag");
  endtask

  initial begin
    int exp_seq [7];
    int rise_at;
    int reached_at;
    exp_seq = '{'h00, 'h10, 'h11, 'h12, 'h13, 'h14, 'h15};

    reset = 1; enable = 0; direction = 0; counter_type = 0;
    step(1, 0, 0);
    step(1, 1, 1);

    // 1. watermark detection
    check(counter_state == 5'h00, "state after reset");
    for (int i = 0; i < N; i++) begin
      step(0, 1, KEY[i]);
      check(counter_state == 5'(exp_seq[i + 1]),
            $sformatf("signature word %0d: state %02h expected %02h", i + 1, counter_state, exp_seq[i + 1]));
      check(!counter_output, "output high before the signature ended");
    end
    reached_at = cycles;
    step(0, 1, 'b100);
    rise_at = counter_output ? cycles : -1;
    check(rise_at - reached_at == 1,
          $sformatf("end of signature signalled %0d clocks after r6 (expected 1)", rise_at - reached_at));

    // 2. the six counting modes from reset
    for (int c = 0; c < 6; c++) begin
      step(1, 1, 0);
      for (int k = 0; k < 20; k++) begin
        step(0, 1, c);
        if (c == 1 && k == 0)
          check(counter_state == 5'h10, "binary up from 0 does not enter r1");
      end
    end

    // 3. interrupted signature, holds, invalid mode
    step(1, 1, 0);
    step(0, 1, KEY[0]);
    step(0, 1, KEY[1]);
    step(0, 1, 'b000);          // not y3: back to the original graph
    check(counter_state < 5'h10, "interrupted signature stays in watermark states");
    step(0, 0, 'b001);
    step(0, 0, 'b011);
    step(0, 1, 'b110);
    step(0, 1, 'b111);
    check(counter_state == 5'h00, "invalid mode does not return to S0");

    // 4. random traffic, biased toward the signature
    for (int k = 0; k < 20000; k++) begin
      int ctrl, r;
      bit rst, en;
      r   = $urandom_range(0, 99);
      rst = (r < 2);
      en  = (r >= 2 && r < 8) ? 1'b0 : 1'b1;
      if (ref_s == 0 && $urandom_range(0, 3) == 0)
        ctrl = KEY[0];
      else if (ref_s >= 16 && ref_s < 16 + N - 1 && $urandom_range(0, 9) < 8)
        ctrl = KEY[ref_s - 15];
      else if ($urandom_range(0, 7) == 0)
        ctrl = 1;                               // returns to S0 now and then
      else
        ctrl = $urandom_range(0, 7);
      step(rst, en, ctrl);
    end

    // mechanism coverage
    for (int c = 0; c < 8; c++)
      check(n_mode[c] > 0, $sformatf("control word %03b never applied", c));
    for (int m = 0; m < 3; m++)
      check(n_tc[m] > 0, $sformatf("no terminal count in mode %0d", m));
    check(n_wrap > 0,     "no binary wrap-around");
    check(n_enter > 0,    "watermark never entered");
    check(n_abort > 0,    "no interrupted signature");
    check(n_complete > 1, "signature completed too rarely");
    check(n_hold > 0,     "enable never low");
    check(n_reset > 0,    "no reset");
    check(n_invalid > 0,  "invalid mode never applied");
    $display("mechanisms: steps 000..111 = %0d %0d %0d %0d %0d %0d %0d %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5], n_mode[6], n_mode[7]);
    $display("mechanisms: terminal counts bin/gray/bcd = %0d/%0d/%0d, wraps %0d",
             n_tc[0], n_tc[1], n_tc[2], n_wrap);
    $display("mechanisms: watermark entered %0d, interrupted %0d, completed %0d",
             n_enter, n_abort, n_complete);
    $display("mechanisms: holds %0d, resets %0d, invalid mode %0d", n_hold, n_reset, n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
