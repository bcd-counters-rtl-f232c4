// tb_lab5: end-to-end testbench of the pushbutton-controlled four-digit
// counter, observed only at the board pins.
//
// The clock is scaled so the run is short: CLK_HZ = 2000 with UP_HZ = 1000
// and DOWN_HZ = 100 gives one up count every 2 cycles and one down count
// every 20 cycles (the same 10:1 ratio as on the board), and each display
// digit is lit for 2 cycles. The testbench presses the buttons like a user:
// both to reset, then up or down for a chosen number of cycles, then lets go.
// While no button is pushed it reads the number off the display by
// following the digit enables over two refresh periods and decoding the
// segment patterns with its own table. Each reading is checked against the
// previous one: the change must be the number of counts the button's rate
// allows in the time it was held (floor or ceiling of cycles / period),
// modulo 10000, in the right direction.
//
// Mechanisms counted, each of which must happen at least once: reset by both
// buttons, counting up, counting down, a carry or borrow reaching each of
// digits 1..3, the 9999 -> 0000 wrap, the 0000 -> 9999 wrap, and every digit
// position being shown.
module tb_lab5;

  localparam int unsigned CLK_HZ  = 2000;
  localparam int unsigned UP_HZ   = 1000;
  localparam int unsigned DOWN_HZ = 100;
  localparam int unsigned DWELL   = 2;
  localparam int          N       = 4;
  localparam int          MOD     = 10_000;
  localparam int          UP_P    = CLK_HZ / UP_HZ;
  localparam int          DOWN_P  = CLK_HZ / DOWN_HZ;

  logic clock = 1'b0;
  logic up_in = 1'b0, down_in = 1'b0;
  logic a, b, c, d, e, f, g, dp;
  logic [N-1:0] en;

  int checks = 0, failures = 0;
  int value;                      // last number read from the display
  int n_reset = 0, n_up = 0, n_down = 0, n_wrap_up = 0, n_wrap_down = 0;
  int n_carry [N];
  int n_shown [N];

  lab5 #(.CLK_HZ(CLK_HZ), .UP_HZ(UP_HZ), .DOWN_HZ(DOWN_HZ), .DIGIT_CYCLES(DWELL)) dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (display=%0d)", what, $time, value);
    end
  endtask

  // Segment pattern {g,f,e,d,c,b,a} back to a digit, -1 if not a digit.
  function automatic int decode(input logic [6:0] s);
    case (s)
      7'b0111111: return 0;  7'b0000110: return 1;  7'b1011011: return 2;
      7'b1001111: return 3;  7'b1100110: return 4;  7'b1101101: return 5;
      7'b1111101: return 6;  7'b0000111: return 7;  7'b1111111: return 8;
      7'b1101111: return 9;  default:    return -1;
    endcase
  endfunction

  task automatic read_display(output int v);
    int dig [N];
    foreach (dig[i]) dig[i] = -1;
    repeat (2 * N * DWELL) begin
      @(negedge clock);
      check(dp == 1'b0, "decimal point off");
      check($onehot(en), "one digit enabled");
      for (int i = 0; i < N; i++)
        if (en[i]) begin
          dig[i] = decode({g, f, e, d, c, b, a});
          n_shown[i]++;
        end
    end
    v = 0;
    for (int i = N - 1; i >= 0; i--) begin
      check(dig[i] >= 0, "digit readable");
      v = v * 10 + ((dig[i] < 0) ? 0 : dig[i]);
    end
  endtask

  task automatic release_and_read(output int v);
    @(negedge clock);
    up_in = 1'b0; down_in = 1'b0;
    repeat (4) @(posedge clock);   // let the synchroniser empty
    read_display(v);
  endtask

  task automatic do_reset();
    @(negedge clock);
    up_in = 1'b1; down_in = 1'b1;
    repeat (10) @(posedge clock);
    release_and_read(value);
    check(value == 0, "both buttons reset the count");
    n_reset++;
  endtask

  // Hold one button for `cycles` clock cycles and check the new reading.
  task automatic hold(input bit go_up, input int cycles);
    int prev, now, steps, lo, hi, p, unwrapped;
    p = go_up ? UP_P : DOWN_P;
    prev = value;
    @(negedge clock);
    up_in = go_up; down_in = !go_up;
    repeat (cycles) @(posedge clock);
    release_and_read(now);
    steps = go_up ? (now - prev + MOD) % MOD : (prev - now + MOD) % MOD;
    lo = cycles / p;
    hi = (cycles + p - 1) / p;
    check(steps >= lo && steps <= hi, go_up ? "up count rate" : "down count rate");
    if (steps < lo || steps > hi)
      $display("  %s: %0d -> %0d, %0d steps, expected %0d..%0d", go_up ? "up" : "down", prev, now, steps, lo, hi);
    unwrapped = go_up ? prev + steps : prev - steps;
    if (go_up) n_up++; else n_down++;
    if (unwrapped >= MOD) n_wrap_up++;
    if (unwrapped < 0)    n_wrap_down++;
    for (int i = 1; i < N; i++) begin
      int s = 1;
      for (int j = 0; j < i; j++) s *= 10;
      if ($floor(real'(unwrapped) / s) != $floor(real'(prev) / s)) n_carry[i]++;
    end
    value = now;
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("  %-28s %0d", what, n);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_carry[i]) n_carry[i] = 0;
    foreach (n_shown[i]) n_shown[i] = 0;
    value = 0;
    repeat (3) @(posedge clock);
    do_reset();
    hold(1'b1, UP_P * 1234 + 1);      // about 1234
    hold(1'b1, UP_P * 9000);          // past 9999 into 0xxx
    hold(1'b0, DOWN_P * 300);         // back down past 0000
    hold(1'b0, DOWN_P * 55 + 7);
    for (int i = 0; i < 20; i++)      // short random presses
      hold(1'($urandom_range(0, 1)), $urandom_range(1, 400));
    do_reset();
    hold(1'b0, DOWN_P * 3);           // 0000 -> 9997
    hold(1'b1, UP_P * 5);             // 9997 -> 0002
    do_reset();

    $display("mechanisms:");
    need(n_reset,     "reset (both buttons)");
    need(n_up,        "count up");
    need(n_down,      "count down");
    need(n_carry[1],  "carry/borrow into digit 1");
    need(n_carry[2],  "carry/borrow into digit 2");
    need(n_carry[3],  "carry/borrow into digit 3");
    need(n_wrap_up,   "wrap 9999 -> 0000");
    need(n_wrap_down, "wrap 0000 -> 9999");
    for (int i = 0; i < N; i++) need(n_shown[i], $sformatf("digit %0d displayed", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_lab5
