// tb_display_mux: self-checking testbench for the 7-segment multiplexer.
//
// Uses DIGIT_CYCLES = 5 to keep the run short. For many random sets of four
// BCD digits it watches two full refresh periods and checks, every cycle,
// that exactly one enable is on, that the segment pattern matches the
// testbench's own table for the digit of that enable, that dp is off, that
// the enables rotate 0,1,2,3 and that each digit stays on for exactly
// DIGIT_CYCLES cycles. It also checks that every digit was shown.
module tb_display_mux;
  import bcd_pkg::*;

  localparam int unsigned N     = 4;
  localparam int unsigned DWELL = 5;

  logic  clock = 1'b0;
  bcd_t  digits [N];
  seg7_t seg;
  logic  dp;
  logic [N-1:0] en;

  int checks = 0, failures = 0;
  int shown [N];

  display_mux #(.NUM_DIGITS(N), .DIGIT_CYCLES(DWELL)) dut (.*);

  always #5 clock = ~clock;

  // Independent pattern table, written as lit-segment letters.
  function automatic seg7_t expected(input int v);
    string s;
    seg7_t r = '0;
    case (v)
      0: s = "abcdef";  1: s = "bc";     2: s = "abdeg";   3: s = "abcdg";
      4: s = "bcfg";    5: s = "acdfg";  6: s = "acdefg";  7: s = "abc";
      8: s = "abcdefg"; 9: s = "abcdfg"; default: s = "";
    endcase
    for (int i = 0; i < s.len(); i++) r[3'(s[i] - "a")] = 1'b1;
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (en=%b seg=%b)", what, $time, en, seg);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, prev_idx, run;
    foreach (shown[i]) shown[i] = 0;
    foreach (digits[i]) digits[i] = bcd_t'(i);
    // Let the free-running counters settle into range.
    repeat (2 * N * DWELL) @(posedge clock);
    #1 prev_idx = -1; run = 0;
    for (int set = 0; set < 200; set++) begin
      foreach (digits[i]) digits[i] = bcd_t'($urandom_range(0, 9));
      for (int t = 0; t < 2 * N * DWELL; t++) begin
        #1;
        check($onehot(en), "one enable at a time");
        check(dp == 1'b0, "dp off");
        idx = -1;
        for (int i = 0; i < N; i++) if (en[i]) idx = i;
        if (idx >= 0) begin
          check(seg == expected(int'(digits[idx])), "segment pattern");
          shown[idx]++;
          if (idx == prev_idx) run++;
          else begin
            if (prev_idx >= 0) begin
              check(idx == (prev_idx + 1) % N, "enable rotation");
              check(run == DWELL, "dwell time");
            end
            run = 1;
          end
          prev_idx = idx;
        end
        @(posedge clock);
      end
    end
    foreach (shown[i]) check(shown[i] > 0, "digit shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_display_mux
