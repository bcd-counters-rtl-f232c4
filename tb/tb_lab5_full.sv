// tb_lab5_full: the board demonstration at full size, default parameters
// (50 MHz clock, 1 kHz up, 100 Hz down, 50,000 cycles per display digit).
//
// It repeats what a user does with the finished board: push both buttons to
// reset and read 0000 off the display; hold up_in for 1.01 s (50,500,000
// cycles) and read a count above 1000; push both to reset; hold down_in for
// 1.01 s and read a count below 9900. As the hold time is a whole number of
// both count periods, the counts are exact: 1010 up, and 101 down from 0000,
// which leaves 9899. The display is read only at the pins by
// following the digit enables over two refresh periods (400,000 cycles) and
// decoding the segments with the testbench's own table.
module tb_lab5_full;

  localparam int N       = 4;
  localparam int CLK_HZ  = 50_000_000;
  localparam int HOLD    = 50_500_000;      // 1.01 s
  localparam int REFRESH = N * 50_000;

  logic clock = 1'b0;
  logic up_in = 1'b0, down_in = 1'b0;
  logic a, b, c, d, e, f, g, dp;
  logic [N-1:0] en;

  int checks = 0, failures = 0;
  int value;

  lab5 dut (.*);

  always #10 clock = ~clock;   // 20 time units per cycle; only cycle counts matter

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (display=%0d)", what, value);
    end
  endtask

  function automatic int decode(input logic [6:0] s);
    case (s)
      7'b0111111: return 0;  7'b0000110: return 1;  7'b1011011: return 2;
      7'b1001111: return 3;  7'b1100110: return 4;  7'b1101101: return 5;
      7'b1111101: return 6;  7'b0000111: return 7;  7'b1111111: return 8;
      7'b1101111: return 9;  default:    return -1;
    endcase
  endfunction

  task automatic press(input bit u, input bit dn, input int cycles);
    @(negedge clock);
    up_in = u; down_in = dn;
    repeat (cycles) @(posedge clock);
    @(negedge clock);
    up_in = 1'b0; down_in = 1'b0;
    repeat (4) @(posedge clock);
  endtask

  task automatic read_display(output int v);
    int dig [N];
    foreach (dig[i]) dig[i] = -1;
    repeat (2 * REFRESH) begin
      @(negedge clock);
      for (int i = 0; i < N; i++)
        if (en[i]) dig[i] = decode({g, f, e, d, c, b, a});
    end
    v = 0;
    for (int i = N - 1; i >= 0; i--) begin
      check(dig[i] >= 0, "digit readable");
      v = v * 10 + ((dig[i] < 0) ? 0 : dig[i]);
    end
  endtask

  initial begin
    #4_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    press(1'b1, 1'b1, 100);
    read_display(value);
    check(value == 0, "reset by both buttons");

    press(1'b1, 1'b0, HOLD);
    read_display(value);
    $display("after 1.01 s of up_in:   %04d", value);
    check(value > 1000, "more than 1000 after about one second up");
    check(value == 1010, "1 kHz rate");

    press(1'b1, 1'b1, 100);
    read_display(value);
    check(value == 0, "reset again");

    press(1'b0, 1'b1, HOLD);
    read_display(value);
    $display("after 1.01 s of down_in: %04d", value);
    check(value < 9900, "less than 9900 after about one second down");
    check(value == 9899, "100 Hz rate");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_lab5_full
