// tb_vc_mult: exhaustive self-check of the 8x8 vertical-crosswise
// multiplier against integer multiplication (65536 operand pairs).
// Counts products whose middle (crosswise) column produced a carry into the
// top half, and fails if that never happened. Watchdog included.
module tb_vc_mult;
  logic clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0, cross_carry = 0;

  vc_mult dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int mid;
        a = 8'(x);
        b = 8'(y);
        @(posedge clk);
        #1;
        checks++;
        if (int'(p) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", x, y, p);
        end
        mid = (x % 16) * (y / 16) + (x / 16) * (y % 16) + ((x % 16) * (y % 16)) / 16;
        if (mid >= 16) cross_carry++;
      end
    end
    $display("crosswise column carries=%0d", cross_carry);
    if (cross_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
