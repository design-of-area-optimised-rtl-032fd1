// tb_bcd_arith_top: end-to-end self-check of the top level at its default
// size (two-digit operands), with no parameter overrides.
// Both units are exercised together, one operand set per clock: the
// multiplier over all 10,000 pairs 00..99 x 00..99, while the adder is fed a
// different, shuffled pair each cycle so that its 10,000 pairs are also all
// covered. Results are compared with integer arithmetic re-encoded as BCD.
// The run counts how often each mechanism of the design was used and fails
// if any never was: low-digit decimal correction, upper-digit correction
// from a 9 plus an incoming carry, a binary nibble carry in the adder, the
// adder's decimal carry out, a carry out of the multiplier's crosswise
// column, and a four-digit product. A watchdog ends a hung run.
module tb_bcd_arith_top;
  logic clk = 1'b0;
  logic [7:0]  mul_a, mul_b, add_a, add_b, add_sum;
  logic [15:0] mul_p;
  logic        add_cout;
  int checks = 0, failures = 0;
  int low_fix = 0, nine_plus_carry = 0, nibble_carry = 0, carries = 0;
  int cross_carry = 0, four_digit = 0;

  bcd_arith_top dut (
    .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p),
    .add_a(add_a), .add_b(add_b), .add_sum(add_sum), .add_cout(add_cout)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] to_bcd4(input int v);
    return {4'(v / 1000), 4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10000; n++) begin
      int mx, my, ax, ay, total, prod, mid;
      mx = n / 100;
      my = n % 100;
      // 37 is coprime to 10000, so n -> n*37 mod 10000 visits every pair
      ax = ((n * 37) % 10000) / 100;
      ay = ((n * 37) % 10000) % 100;
      mul_a = to_bcd4(mx)[7:0];
      mul_b = to_bcd4(my)[7:0];
      add_a = to_bcd4(ax)[7:0];
      add_b = to_bcd4(ay)[7:0];
      @(posedge clk);
      #1;
      prod  = mx * my;
      total = ax + ay;
      checks++;
      if (mul_p !== to_bcd4(prod)) begin
        failures++;
        if (failures < 10) $display("FAIL mul %0d * %0d: got %h", mx, my, mul_p);
      end
      checks++;
      if (add_sum !== to_bcd4(total % 100)[7:0] || add_cout !== (total >= 100)) begin
        failures++;
        if (failures < 10) $display("FAIL add %0d + %0d: got %0b %h", ax, ay, add_cout, add_sum);
      end
      if ((ax % 10) + (ay % 10) >= 10) low_fix++;
      if ((ax % 10) + (ay % 10) >= 10 && (ax / 10) + (ay / 10) == 9) nine_plus_carry++;
      if ((ax % 10) + (ay % 10) >= 16 || (ax / 10) + (ay / 10) >= 16) nibble_carry++;
      if (total >= 100) carries++;
      mid = (mx % 16) * (my / 16) + (mx / 16) * (my % 16) + ((mx % 16) * (my % 16)) / 16;
      if (mid >= 16) cross_carry++;
      if (prod >= 1000) four_digit++;
    end
    $display("adder: low-digit corrections=%0d 9+carry=%0d nibble carries=%0d carries out=%0d",
             low_fix, nine_plus_carry, nibble_carry, carries);
    $display("multiplier: crosswise column carries=%0d four-digit products=%0d",
             cross_carry, four_digit);
    if (low_fix == 0)         failures++;
    if (nine_plus_carry == 0) failures++;
    if (nibble_carry == 0)    failures++;
    if (carries == 0)         failures++;
    if (cross_carry == 0)     failures++;
    if (four_digit == 0)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
