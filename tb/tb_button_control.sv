// tb_button_control: self-checking testbench for the pushbutton controller.
//
// Runs with a scaled clock (CLK_HZ = 1000, UP_HZ = 100, DOWN_HZ = 10), so an
// up count is due every 10 cycles and a down count every 100 cycles, the same
// 10:1 ratio as 1 kHz : 100 Hz at 50 MHz. It checks:
//   - both buttons pushed: reset asserted after the 2-cycle synchroniser
//     delay and no enable pulses while it is held;
//   - up only: enable pulses exactly UP_DIV cycles apart, one cycle wide,
//     with up = 1, and the first one no later than UP_DIV cycles after reset
//     is released (prescalers restart from reset);
//   - down only: pulses exactly DOWN_DIV cycles apart with up = 0;
//   - no button: no pulses and no reset.
// Inputs change on the falling clock edge; outputs are sampled just after the
// rising edge.
module tb_button_control;

  localparam int unsigned CLK_HZ   = 1000;
  localparam int unsigned UP_HZ    = 100;
  localparam int unsigned DOWN_HZ  = 10;
  localparam int          UP_DIV   = CLK_HZ / UP_HZ;
  localparam int          DOWN_DIV = CLK_HZ / DOWN_HZ;

  logic clock = 1'b0;
  logic up_in, down_in;
  logic reset, enable, up;

  int checks = 0, failures = 0;

  button_control #(.CLK_HZ(CLK_HZ), .UP_HZ(UP_HZ), .DOWN_HZ(DOWN_HZ)) dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (reset=%0b enable=%0b up=%0b)", what, $time, reset, enable, up);
    end
  endtask

  task automatic set_buttons(input bit u, input bit d);
    @(negedge clock);
    up_in = u; down_in = d;
  endtask

  // Holds the current buttons for n cycles, records the enable pulses and
  // checks their spacing and direction. Returns the number of pulses and the
  // cycle of the first one.
  task automatic watch(input int n, input int spacing, input bit dir, output int pulses, output int first);
    int last = -1;
    pulses = 0; first = -1;
    for (int t = 0; t < n; t++) begin
      @(posedge clock); #1;
      if (enable) begin
        check(up == dir, "direction during pulse");
        check(!reset, "no reset during count");
        if (last >= 0) check(t - last == spacing, "pulse spacing");
        else first = t;
        last = t;
        pulses++;
      end
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pulses, first, rise;
    up_in = 1'b0; down_in = 1'b0;
    repeat (5) @(posedge clock);

    // Both pushed: reset after the synchroniser, no enable.
    set_buttons(1'b1, 1'b1);
    rise = -1;
    for (int t = 1; t <= 6; t++) begin
      @(posedge clock); #1;
      if (reset && rise < 0) rise = t;
      check(!enable, "no enable while both pushed");
    end
    check(rise == 2, "reset after two-cycle synchroniser");
    repeat (3 * DOWN_DIV) begin
      @(posedge clock); #1;
      check(reset && !enable, "reset held while both pushed");
    end

    // Release down: up only. First pulse within one period.
    set_buttons(1'b1, 1'b0);
    watch(20 * UP_DIV, UP_DIV, 1'b1, pulses, first);
    check(pulses >= 19 && pulses <= 20, "up pulse count");
    check(first >= 0 && first <= UP_DIV + 2, "first up pulse after reset");

    // Nothing pushed.
    set_buttons(1'b0, 1'b0);
    // A pulse may still come in the two cycles the synchroniser needs.
    pulses = 0;
    repeat (3 * DOWN_DIV) begin
      @(posedge clock); #1;
      if (enable) pulses++;
    end
    check(pulses <= 1, "no pulses when released");
    repeat (5) begin @(posedge clock); #1; check(!enable && !reset, "idle"); end

    // Down only.
    set_buttons(1'b0, 1'b1);
    watch(10 * DOWN_DIV, DOWN_DIV, 1'b0, pulses, first);
    check(pulses >= 9 && pulses <= 10, "down pulse count");

    // Both again, then release both.
    set_buttons(1'b1, 1'b1);
    repeat (3) @(posedge clock);
    #1 check(reset, "reset again");
    set_buttons(1'b0, 1'b0);
    repeat (3) @(posedge clock);
    #1 check(!reset, "reset released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_button_control
