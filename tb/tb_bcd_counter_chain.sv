// tb_bcd_counter_chain: self-checking testbench for the four-digit counter.
//
// The reference is an integer modulo 10**NUM_DIGITS. The test counts up from
// 0000 through the 9999 -> 0000 wrap, back down through 0000 -> 9999, and
// then applies random enable/up/reset cycles. After every clock edge it
// compares all digits with the model, and before every edge it checks the
// carry out (1 only when enabled at 9999 going up or at 0000 going down).
// It also counts how often a carry rippled into each digit, so a chain that
// never exercised a digit is reported.
module tb_bcd_counter_chain;
  import bcd_pkg::*;

  localparam int unsigned N = 4;
  localparam int MOD = 10_000;

  logic clock = 1'b0;
  logic reset, enable, up;
  bcd_t digits [N];
  logic carry;

  int checks = 0, failures = 0;
  int model;
  int ripples [N];

  bcd_counter_chain #(.NUM_DIGITS(N)) dut (.*);

  always #5 clock = ~clock;

  function automatic int value_of();
    int v = 0;
    for (int i = N - 1; i >= 0; i--) v = v * 10 + int'(digits[i]);
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (value=%0d model=%0d up=%0b enable=%0b)", what, value_of(), model, up, enable);
    end
  endtask

  task automatic step(input bit r, input bit en, input bit u);
    int prev;
    reset = r; enable = en; up = u; #1;
    check(carry == (en && (u ? model == MOD - 1 : model == 0)), "carry out");
    prev = model;
    @(posedge clock);
    if (r)       model = 0;
    else if (en) model = u ? (model + 1) % MOD : (model + MOD - 1) % MOD;
    #1;
    for (int i = 1; i < N; i++)
      if (!r && en && digits[i] != bcd_t'((prev / (10 ** i)) % 10)) ripples[i]++;
    for (int i = 0; i < N; i++)
      check(digits[i] <= 4'd9, "digit in range");
    check(value_of() == model, "count value");
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ripples[i]) ripples[i] = 0;
    model = 0;
    step(1'b1, 1'b0, 1'b1);
    // Up through the wrap, then down through it again.
    for (int i = 0; i < MOD + 5; i++) step(1'b0, 1'b1, 1'b1);
    for (int i = 0; i < 20; i++)      step(1'b0, 1'b1, 1'b0);
    // Hold: enable low keeps the value.
    for (int i = 0; i < 5; i++)       step(1'b0, 1'b0, i[0]);
    // Random mix.
    for (int i = 0; i < 20000; i++)
      step($urandom_range(0, 999) == 0, $urandom_range(0, 3) != 0, $urandom_range(0, 2) != 0);
    for (int i = 1; i < N; i++) begin
      checks++;
      if (ripples[i] == 0) begin
        failures++;
        $display("FAIL no carry ever reached digit %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_bcd_counter_chain
