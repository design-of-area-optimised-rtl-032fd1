// tb_bcd_mult: exhaustive self-check of the two-digit BCD multiplier:
// all 10,000 operand pairs 00..99 x 00..99, one per clock, against integer
// multiplication re-encoded as four BCD digits. A three-digit instance gets
// 2,000 random pairs as a check of the digit-count parameter. Watchdog included.
module tb_bcd_mult;
  logic clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  logic [11:0] a3, b3;
  logic [23:0] p3;

  bcd_mult dut (.a(a), .b(b), .p(p));
  bcd_mult #(.DIGITS(3)) dut3 (.a(a3), .b(b3), .p(p3));

  always #5 clk = ~clk;

  function automatic logic [23:0] to_bcd6(input int v);
    logic [23:0] r;
    for (int d = 0; d < 6; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [15:0] to_bcd4(input int v);
    return {4'(v / 1000), 4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  initial begin
    repeat (15000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 100; x++) begin
      for (int y = 0; y < 100; y++) begin
        a = to_bcd4(x)[7:0];
        b = to_bcd4(y)[7:0];
        @(posedge clk);
        #1;
        checks++;
        if (p !== to_bcd4(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %h", x, y, p);
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int x, y;
      x = int'($urandom_range(999));
      y = int'($urandom_range(999));
      a3 = to_bcd6(x)[11:0];
      b3 = to_bcd6(y)[11:0];
      @(posedge clk);
      #1;
      checks++;
      if (p3 !== to_bcd6(x * y)) begin
        failures++;
        if (failures < 10) $display("FAIL 3-digit %0d * %0d: got %h", x, y, p3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
