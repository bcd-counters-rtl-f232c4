// bcd_counter_chain: a NUM_DIGITS-digit decimal up/down counter.
//
// Built as the lab describes: NUM_DIGITS bcdcount digits share clock, reset
// and up, and each digit's carry drives the enable of the next more
// significant digit. The external `enable` goes to digit 0 (least
// significant). Because carry is combinational, a step from 0999 to 1000 (or
// back) ripples through all digits within the same clock cycle, and every
// digit updates on the same edge. `carry` is the carry/borrow out of the most
// significant digit: 1 in the cycle in which the counter wraps from 9..9 to
// 0..0 (up) or from 0..0 to 9..9 (down).
//
// Timing: one count step per clock cycle in which `enable` is 1; the
// synchronous reset clears every digit on the next edge.
module bcd_counter_chain
  import bcd_pkg::*;
#(
  parameter int unsigned NUM_DIGITS = 4
) (
  input  logic clock,
  input  logic reset,
  input  logic enable,
  input  logic up,
  output bcd_t digits [NUM_DIGITS],
  output logic carry
);

  // ripple[i] is the enable of digit i; ripple[NUM_DIGITS] is the carry out.
  logic [NUM_DIGITS:0] ripple;

  assign ripple[0] = enable;

  for (genvar i = 0; i < NUM_DIGITS; i++) begin : g_digit
    bcdcount u_digit (
      .clock  (clock),
      .reset  (reset),
      .enable (ripple[i]),
      .up     (up),
      .count  (digits[i]),
      .carry  (ripple[i+1])
    );
  end

  assign carry = ripple[NUM_DIGITS];

endmodule : bcd_counter_chain
