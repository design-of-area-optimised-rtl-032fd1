// tb_bin_to_bcd: exhaustive self-check of the 14-bit binary-to-BCD
// converter over 0..9999 (every value a two-digit BCD product can reach and
// beyond). The expected digits come from integer division by powers of ten.
module tb_bin_to_bcd;
  logic clk = 1'b0;
  logic [13:0] bin;
  logic [15:0] bcd;
  int checks = 0, failures = 0;

  bin_to_bcd dut (.bin(bin), .bcd(bcd));

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
    for (int v = 0; v < 10000; v++) begin
      bin = 14'(v);
      @(posedge clk);
      #1;
      checks++;
      if (bcd !== to_bcd4(v)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: got %h", v, bcd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
