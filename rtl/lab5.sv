// lab5: four-digit decimal up/down counter with pushbutton control and a
// multiplexed 7-segment LED display, for a small CPLD board.
//
// Structure (as the lab's test circuit describes it):
//   button_control    up_in / down_in pins -> reset, enable, up
//   bcd_counter_chain four bcdcount digits, carry of each digit into the
//                     enable of the next, clock/reset/up shared
//   display_mux       shows the four digits on one set of segment lines,
//                     one digit enable at a time
//
// Behaviour: holding up_in counts up at 1 kHz (about 1000 counts in one
// second), holding down_in counts down at 100 Hz, holding both resets the
// count to 0000. The counter wraps 9999 -> 0000 going up and 0000 -> 9999
// going down. There is no reset pin: the count is cleared by pushing both
// buttons.
//
// Ports are the 15 board pins: clock (50 MHz, PIN_12), up_in (PIN_99) and
// down_in (PIN_97), both with the pad's weak pull-up enabled, segments a..g
// (PIN_33, 44, 38, 34, 30, 52, 40), dp (PIN_36) and digit enables en[0..3]
// (PIN_42, 48, 50, 35). Pin locations and pull-ups are set in the vendor
// tool, not here. en[0] is the least significant digit; segments and enables
// are active high (a choice of this design, see display_mux), as are the
// pushed buttons (see button_control).
module lab5
  import bcd_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned UP_HZ        = 1_000,
  parameter int unsigned DOWN_HZ      = 100,
  parameter int unsigned NUM_DIGITS   = 4,
  parameter int unsigned DIGIT_CYCLES = 50_000
) (
  input  logic                  clock,
  input  logic                  up_in,
  input  logic                  down_in,
  output logic                  a,
  output logic                  b,
  output logic                  c,
  output logic                  d,
  output logic                  e,
  output logic                  f,
  output logic                  g,
  output logic                  dp,
  output logic [NUM_DIGITS-1:0] en
);

  logic  cnt_reset, cnt_enable, cnt_up, cnt_carry;
  bcd_t  digits [NUM_DIGITS];
  seg7_t seg;

  button_control #(
    .CLK_HZ  (CLK_HZ),
    .UP_HZ   (UP_HZ),
    .DOWN_HZ (DOWN_HZ)
  ) u_buttons (
    .clock   (clock),
    .up_in   (up_in),
    .down_in (down_in),
    .reset   (cnt_reset),
    .enable  (cnt_enable),
    .up      (cnt_up)
  );

  // The carry out of the top digit (the counter wrapping) drives nothing on
  // this board; it is left unconnected on purpose.
  bcd_counter_chain #(
    .NUM_DIGITS (NUM_DIGITS)
  ) u_counter (
    .clock  (clock),
    .reset  (cnt_reset),
    .enable (cnt_enable),
    .up     (cnt_up),
    .digits (digits),
    .carry  (cnt_carry)
  );

  display_mux #(
    .NUM_DIGITS   (NUM_DIGITS),
    .DIGIT_CYCLES (DIGIT_CYCLES)
  ) u_display (
    .clock  (clock),
    .digits (digits),
    .seg    (seg),
    .dp     (dp),
    .en     (en)
  );

  assign {g, f, e, d, c, b, a} = seg;

endmodule : lab5
