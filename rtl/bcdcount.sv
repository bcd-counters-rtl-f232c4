// bcdcount: one decimal digit of a synchronous BCD up/down counter.
//
// The digit holds 0..9 and changes only on the rising edge of `clock`:
//   - reset          -> 0 (has priority over enable)
//   - enable &  up   -> count + 1, 9 wraps to 0
//   - enable & ~up   -> count - 1, 0 wraps to 9
//   - otherwise      -> hold
// `carry` is combinational (no register): it is 1 when the digit is at 9 and
// is enabled to count up, or is at 0 and is enabled to count down (then it
// means "borrow"). Feeding one digit's carry into the next digit's enable
// builds a multi-digit counter (see bcd_counter_chain); enable is a plain
// synchronous input, never a clock.
//
// The behaviour above follows the lab specification. The reset is taken to be
// synchronous, as the specification says the count changes only on the clock
// edge. What happens in the unused codes 10..15 is this design's choice: they
// can only appear before the first reset, and any count step from them goes
// to 0 (up) or 9 (down) so the digit re-enters the 0..9 cycle at once.
module bcdcount
  import bcd_pkg::*;
(
  input  logic clock,
  input  logic reset,
  input  logic enable,
  input  logic up,
  output bcd_t count,
  output logic carry
);

  bcd_t next_count;

  always_comb begin
    if (up)
      next_count = (count >= BCD_MAX) ? bcd_t'(0) : count + bcd_t'(1);
    else
      next_count = (count == bcd_t'(0) || count > BCD_MAX) ? BCD_MAX : count - bcd_t'(1);
  end

  always_ff @(posedge clock) begin
    if (reset)
      count <= '0;
    else if (enable)
      count <= next_count;
  end

  assign carry = enable && (up ? (count == BCD_MAX) : (count == bcd_t'(0)));

  // Once reset, the digit never leaves 0..9.
  a_reset_clears : assert property (@(posedge clock) reset |=> count == '0);
  a_stays_bcd    : assert property (@(posedge clock) (count <= BCD_MAX) |=> (count <= BCD_MAX));

endmodule : bcdcount
