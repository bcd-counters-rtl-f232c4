// button_control: turns the two pushbuttons into the counter's controls.
//
// Function (from the lab's test circuit): while only up_in is pushed the
// counter counts up at UP_HZ (1 kHz), while only down_in is pushed it counts
// down at DOWN_HZ (100 Hz), and while both are pushed the counter is reset.
//
// How: each button pin is asynchronous to the clock, so it first passes a
// two-flip-flop synchroniser. Two free-running prescalers divide the clock by
// CLK_HZ/UP_HZ and CLK_HZ/DOWN_HZ and each makes a one-cycle tick at the end
// of its period. `enable` carries the up tick while only up is pushed and the
// down tick while only down is pushed; `up` is 1 while up_in is pushed.
// While both are pushed `reset` is 1 and both prescalers are cleared too, so
// the first count after a reset comes exactly one period after release.
//
// Timing: a button press reaches the outputs two clock cycles after the pin
// changes (synchroniser). `enable` is a one-cycle pulse; at most one per
// period. If CLK_HZ is not a multiple of a rate, the period is rounded down.
//
// Choices of this design, not given by the lab: the synchroniser, no
// debouncer (a bounce can at most add or lose one count at the start of a
// press), the separate prescalers, and the pressed level of the pins.
// PRESSED_LEVEL = 1 reads a pin as pushed when it is high, which is what a
// pulled-up pin wired to ground through the normally-closed contact of a
// button gives; set it to 0 for a normally-open contact.
module button_control #(
  parameter int unsigned CLK_HZ        = 50_000_000,
  parameter int unsigned UP_HZ         = 1_000,
  parameter int unsigned DOWN_HZ       = 100,
  parameter bit          PRESSED_LEVEL = 1'b1
) (
  input  logic clock,
  input  logic up_in,
  input  logic down_in,
  output logic reset,
  output logic enable,
  output logic up
);

  localparam int unsigned UP_DIV   = CLK_HZ / UP_HZ;
  localparam int unsigned DOWN_DIV = CLK_HZ / DOWN_HZ;
  localparam int unsigned UP_W     = (UP_DIV   > 1) ? $clog2(UP_DIV)   : 1;
  localparam int unsigned DOWN_W   = (DOWN_DIV > 1) ? $clog2(DOWN_DIV) : 1;

  // Two-stage synchronisers, index 1 is the synchronised value.
  logic [1:0] up_sync, down_sync;
  logic       up_pushed, down_pushed;

  always_ff @(posedge clock) begin
    up_sync   <= {up_sync[0],   up_in};
    down_sync <= {down_sync[0], down_in};
  end

  assign up_pushed   = (up_sync[1]   == PRESSED_LEVEL);
  assign down_pushed = (down_sync[1] == PRESSED_LEVEL);

  // Prescalers. The >= compare also brings a counter back into range if it
  // powers up outside it.
  logic [UP_W-1:0]   up_div;
  logic [DOWN_W-1:0] down_div;
  logic              up_tick, down_tick;

  assign up_tick   = (up_div   >= UP_W'(UP_DIV - 1));
  assign down_tick = (down_div >= DOWN_W'(DOWN_DIV - 1));

  always_ff @(posedge clock) begin
    if (reset) begin
      up_div   <= '0;
      down_div <= '0;
    end else begin
      up_div   <= up_tick   ? '0 : up_div   + 1'b1;
      down_div <= down_tick ? '0 : down_div + 1'b1;
    end
  end

  assign reset  = up_pushed && down_pushed;
  assign up     = up_pushed;
  assign enable = (up_pushed && !down_pushed && up_tick) ||
                  (down_pushed && !up_pushed && down_tick);

  // The counter never gets a count step and a reset in the same cycle.
  a_no_count_in_reset : assert property (@(posedge clock) !(reset && enable));

endmodule : button_control
