// tb_bcd_to_bin: exhaustive self-check of the two-digit BCD-to-binary
// converter, plus random checks of a four-digit instance. Each BCD input is
// built from an integer by division by ten; the output must equal that
// integer. A watchdog ends the run if it hangs.
module tb_bcd_to_bin;
  logic clk = 1'b0;
  logic [7:0]  bcd2;
  logic [6:0]  bin2;
  logic [15:0] bcd4;
  logic [13:0] bin4;
  int checks = 0, failures = 0;

  bcd_to_bin dut2 (.bcd(bcd2), .bin(bin2));
  bcd_to_bin #(.DIGITS(4)) dut4 (.bcd(bcd4), .bin(bin4));

  always #5 clk = ~clk;

  function automatic logic [15:0] to_bcd4(input int v);
    return {4'(v / 1000), 4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 100; x++) begin
      int r;
      r = int'($urandom_range(9999));
      bcd2 = to_bcd4(x)[7:0];
      bcd4 = to_bcd4(r);
      @(posedge clk);
      #1;
      checks += 2;
      if (int'(bin2) != x) begin
        failures++;
        $display("FAIL 2-digit %0d: got %0d", x, bin2);
      end
      if (int'(bin4) != r) begin
        failures++;
        $display("FAIL 4-digit %0d: got %0d", r, bin4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
