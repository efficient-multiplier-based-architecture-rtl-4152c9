// tb_vedic_mul8x8 -- exhaustive self-check of the 8x8 Vedic multiplier.
// Applies all 65536 operand pairs and compares p with the integer product.
// Also counts how often the carry of ADDER 2 and of ADDER 1 matter, to show
// both carry paths are exercised. Watchdog included.
module tb_vedic_mul8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int c1_cases = 0, c2_cases = 0;

  vedic_mul8x8 dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int mid;
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        // independent view of the middle nibble sums
        mid = (i % 16) * (j / 16) + (i / 16) * (j % 16);
        if (mid >= 256) c1_cases++;
        else if ((mid % 256) + ((i % 16) * (j % 16)) / 16 >= 256) c2_cases++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    checks++;
    if (c1_cases == 0 || c2_cases == 0) begin
      failures++;
      $display("FAIL carry paths not exercised: c1=%0d c2=%0d", c1_cases, c2_cases);
    end
    $display("ADDER1 carry cases %0d, ADDER2 carry cases %0d", c1_cases, c2_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
