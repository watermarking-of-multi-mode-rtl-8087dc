// Self-checking testbench of counter_next_state: every one of the 16 states
// under every one of the 8 control words is compared with the counter's state
// table, written out below entry by entry (next state in hex, output bit).
// Columns, in order: 001 000 011 010 101 100 110 111.
module tb_counter_next_state;
  import mm_counter_pkg::*;

  value_t cur;
  ctrl_t  ctrl;
  value_t nxt;
  logic   out;
  int checks = 0;
  int failures = 0;

  counter_next_state dut (.cur(cur), .ctrl(ctrl), .nxt(nxt), .out(out));

  // Expected {out, next} per state, 8 columns in the order above.
  typedef logic [4:0] entry_t;
  entry_t table_exp [16][8];
  localparam logic [2:0] COL [8] = '{3'b001, 3'b000, 3'b011, 3'b010,
                                     3'b101, 3'b100, 3'b110, 3'b111};

  function automatic entry_t e(input int n, input bit o);
    return {o, 4'(n)};
  endfunction

  initial begin
    table_exp[ 0] = '{e( 1,0), e(15,0), e( 1,0), e( 8,0), e( 1,0), e( 9,0), e(0,0), e(0,0)};
    table_exp[ 1] = '{e( 2,0), e( 0,1), e( 3,0), e( 0,1), e( 2,0), e( 0,1), e(0,0), e(0,0)};
    table_exp[ 2] = '{e( 3,0), e( 1,0), e( 6,0), e( 3,0), e( 3,0), e( 1,0), e(0,0), e(0,0)};
    table_exp[ 3] = '{e( 4,0), e( 2,0), e( 2,0), e( 1,0), e( 4,0), e( 2,0), e(0,0), e(0,0)};
    table_exp[ 4] = '{e( 5,0), e( 3,0), e(12,0), e( 5,0), e( 5,0), e( 3,0), e(0,0), e(0,0)};
    table_exp[ 5] = '{e( 6,0), e( 4,0), e( 4,0), e( 7,0), e( 6,0), e( 4,0), e(0,0), e(0,0)};
    table_exp[ 6] = '{e( 7,0), e( 5,0), e( 7,0), e( 2,0), e( 7,0), e( 5,0), e(0,0), e(0,0)};
    table_exp[ 7] = '{e( 8,0), e( 6,0), e( 5,0), e( 6,0), e( 8,0), e( 6,0), e(0,0), e(0,0)};
    table_exp[ 8] = '{e( 9,0), e( 7,0), e( 0,0), e( 9,0), e( 9,1), e( 7,0), e(0,0), e(0,0)};
    table_exp[ 9] = '{e(10,0), e( 8,0), e( 8,1), e(11,0), e( 0,0), e( 8,0), e(0,0), e(0,0)};
    table_exp[10] = '{e(11,0), e( 9,0), e(11,0), e(14,0), e( 0,0), e( 0,0), e(0,0), e(0,0)};
    table_exp[11] = '{e(12,0), e(10,0), e( 9,0), e(10,0), e( 0,0), e( 0,0), e(0,0), e(0,0)};
    table_exp[12] = '{e(13,0), e(11,0), e(13,0), e( 4,0), e( 0,0), e( 0,0), e(0,0), e(0,0)};
    table_exp[13] = '{e(14,0), e(12,0), e(15,0), e(12,0), e( 0,0), e( 0,0), e(0,0), e(0,0)};
    table_exp[14] = '{e(15,1), e(13,0), e(10,0), e(15,0), e( 0,0), e( 0,0), e(0,0), e(0,0)};
    table_exp[15] = '{e( 0,0), e(14,0), e(14,0), e(13,0), e( 0,0), e( 0,0), e(0,0), e(0,0)};

    for (int s = 0; s < 16; s++) begin
      for (int c = 0; c < 8; c++) begin
        cur  = 4'(s);
        ctrl = ctrl_t'(COL[c]);
        #1;
        checks++;
        if ({out, nxt} !== table_exp[s][c]) begin
          failures++;
          $display("FAIL S%0d ctrl=%03b: got S%0d/%0b expected S%0d/%0b",
                   s, COL[c], nxt, out, table_exp[s][c][3:0], table_exp[s][c][4]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: the sweep takes 128 time units.
  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
