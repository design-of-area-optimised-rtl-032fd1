// tb_urdhva_mult: exhaustive self-check of the 4x4 bit-level
// vertical-crosswise multiplier against integer multiplication.
module tb_urdhva_mult;
  logic clk = 1'b0;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  urdhva_mult dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);
        b = 4'(y);
        @(posedge clk);
        #1;
        checks++;
        if (int'(p) != x * y) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d", x, y, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
