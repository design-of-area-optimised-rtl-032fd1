// tb_bcd_adder: exhaustive self-check of the two-digit BCD adder.
// Every pair of BCD operands 00..99 is applied, one pair per clock; the sum
// and carry are compared with decimal addition done on integers and
// re-encoded digit by digit. It also counts how often the low digit, the
// high digit and the carry out needed decimal correction, and fails if any
// of those never happened. A four-digit instance gets 2,000 random pairs as
// a check of the digit-count parameter. The run also fails if it never saw either of the two corner cases of the upper digit
// (digit sum 9 plus an incoming decimal carry, and a binary nibble carry). A watchdog ends the run if it hangs.
module tb_bcd_adder;
  localparam int unsigned DIGITS = 2;

  logic clk = 1'b0;
  logic [4*DIGITS-1:0] a, b, sum;
  logic                cout;
  int checks = 0, failures = 0;
  int low_fix = 0, high_fix = 0, carries = 0, nine_plus_carry = 0, nibble_carry = 0;

  logic [15:0] a4, b4, sum4;
  logic        cout4;

  bcd_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));
  bcd_adder #(.DIGITS(4)) dut4 (.a(a4), .b(b4), .sum(sum4), .cout(cout4));

  always #5 clk = ~clk;

  function automatic logic [15:0] to_bcd4(input int v);
    return {4'(v / 1000), 4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  function automatic logic [7:0] to_bcd2(input int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  initial begin
    repeat (25000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 100; x++) begin
      for (int y = 0; y < 100; y++) begin
        int total;
        a = to_bcd2(x);
        b = to_bcd2(y);
        @(posedge clk);
        #1;
        total = x + y;
        checks++;
        if (sum !== to_bcd2(total % 100) || cout !== (total >= 100)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d + %0d: got %0b %h, expected %0d", x, y, cout, sum, total);
        end
        if ((x % 10) + (y % 10) >= 10) low_fix++;
        if ((x / 10) + (y / 10) + ((x % 10) + (y % 10) >= 10 ? 1 : 0) >= 10) high_fix++;
        if (total >= 100) carries++;
        if ((x % 10) + (y % 10) >= 10 && (x / 10) + (y / 10) == 9) nine_plus_carry++;
        if ((x % 10) + (y % 10) >= 16 || (x / 10) + (y / 10) >= 16) nibble_carry++;
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int x, y;
      x = int'($urandom_range(9999));
      y = int'($urandom_range(9999));
      a4 = to_bcd4(x);
      b4 = to_bcd4(y);
      @(posedge clk);
      #1;
      checks++;
      if (sum4 !== to_bcd4((x + y) % 10000) || cout4 !== (x + y >= 10000)) begin
        failures++;
        if (failures < 10) $display("FAIL 4-digit %0d + %0d: got %0b %h", x, y, cout4, sum4);
      end
    end
    $display("low-digit corrections=%0d high-digit corrections=%0d carries out=%0d",
             low_fix, high_fix, carries);
    $display("upper digit 9 plus carry=%0d binary nibble carries=%0d", nine_plus_carry, nibble_carry);
    if (low_fix == 0 || high_fix == 0 || carries == 0 || nine_plus_carry == 0 || nibble_carry == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
