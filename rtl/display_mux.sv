// display_mux: drives a multiplexed multi-digit 7-segment LED display.
//
// All digits share the segment lines a..g and dp; each digit has its own
// enable line. The multiplexer shows one digit at a time: a free-running
// counter keeps each digit lit for DIGIT_CYCLES clock cycles, then moves on
// to the next, so the whole display is refreshed every
// NUM_DIGITS * DIGIT_CYCLES cycles (250 Hz at 50 MHz with the default
// 50,000 cycles per digit, fast enough to look steady).
//
// Interface: `digits` are the BCD values to show, index 0 on en[0]. `seg` is
// {g,f,e,d,c,b,a}, 1 = lit; `en` is one-hot, 1 = digit on; `dp` is always
// off as the counter has no decimal point. Outputs follow the registered
// digit index and the current `digits` value with no extra delay.
//
// The lab names the display and its lines (a..g, dp, en[3:0]) but leaves its
// design to an earlier exercise; the refresh rate, the active-high polarity
// of segments and enables, and en[0] being the least significant digit are
// choices of this design.
module display_mux
  import bcd_pkg::*;
#(
  parameter int unsigned NUM_DIGITS   = 4,
  parameter int unsigned DIGIT_CYCLES = 50_000
) (
  input  logic                  clock,
  input  bcd_t                  digits [NUM_DIGITS],
  output seg7_t                 seg,
  output logic                  dp,
  output logic [NUM_DIGITS-1:0] en
);

  localparam int unsigned TIME_W = (DIGIT_CYCLES > 1) ? $clog2(DIGIT_CYCLES) : 1;
  localparam int unsigned SEL_W  = (NUM_DIGITS   > 1) ? $clog2(NUM_DIGITS)   : 1;

  logic [TIME_W-1:0] dwell;
  logic [SEL_W-1:0]  sel;
  logic              next_digit;
  bcd_t              shown;

  // No reset is needed: the >= compares bring both counters into range
  // within one refresh period whatever they power up with.
  assign next_digit = (dwell >= TIME_W'(DIGIT_CYCLES - 1));

  always_ff @(posedge clock) begin
    dwell <= next_digit ? '0 : dwell + 1'b1;
    if (next_digit)
      sel <= (sel >= SEL_W'(NUM_DIGITS - 1)) ? '0 : sel + 1'b1;
  end

  always_comb begin
    shown = '0;
    en    = '0;
    for (int i = 0; i < NUM_DIGITS; i++) begin
      if (sel == SEL_W'(i)) begin
        shown = digits[i];
        en[i] = 1'b1;
      end
    end
  end

  seg7_decode u_decode (
    .digit (shown),
    .seg   (seg)
  );

  assign dp = 1'b0;

endmodule : display_mux
