// tb_bcdcount: self-checking testbench for one BCD digit.
//
// First checks the combinational carry for every count 0..9 and every
// enable/up pair against the truth table (9 with enable and up, or 0 with
// enable and not up). Then applies 2000 random clock cycles of
// reset/enable/up and compares count after every edge with a reference
// model kept as an integer (count modulo 10), including the priority of
// reset over enable. A watchdog ends the run if it hangs.
module tb_bcdcount;
  import bcd_pkg::*;

  logic clock = 1'b0;
  logic reset, enable, up;
  bcd_t count;
  logic carry;

  int checks = 0, failures = 0;
  int model;

  bcdcount dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (count=%0d model=%0d enable=%0b up=%0b carry=%0b)",
               what, count, model, enable, up, carry);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; enable = 1'b0; up = 1'b1;
    @(posedge clock); #1;
    reset = 1'b0;
    model = 0;
    check(count == 4'd0, "reset clears count");

    // Walk up through 0..9 while checking carry in all input combinations.
    for (int v = 0; v < 10; v++) begin
      check(count == bcd_t'(v), "walk up value");
      for (int k = 0; k < 4; k++) begin
        enable = k[1]; up = k[0]; #1;
        check(carry == ((enable && up && v == 9) || (enable && !up && v == 0)),
              "carry truth table");
      end
      enable = 1'b1; up = 1'b1;
      @(posedge clock); #1;
    end
    check(count == 4'd0, "9 + 1 wraps to 0");

    // Random stimulus against the modulo-10 model.
    for (int i = 0; i < 2000; i++) begin
      reset  = ($urandom_range(0, 19) == 0);
      enable = $urandom_range(0, 2) != 0;
      up     = 1'($urandom_range(0, 1));
      #1;
      check(carry == (enable && (up ? model == 9 : model == 0)), "random carry");
      @(posedge clock);
      if (reset)       model = 0;
      else if (enable) model = up ? (model + 1) % 10 : (model + 9) % 10;
      #1;
      check(count == bcd_t'(model), "random count");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_bcdcount
