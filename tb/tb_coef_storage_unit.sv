// tb_coef_storage_unit -- self-check of the coefficient ROM.
// Selects every filter in random order (with some cycles where en is low and
// the select must not be taken) and checks all N outputs, arranged as
// c[m][j] = h(mL+j), against the default table formula
//   h_f(i) = (37*(f+1)*(i+1) + 11*f) mod 256
// evaluated here. Also checks the reset value (filter 0).
module tb_coef_storage_unit;
  localparam int unsigned L = 8, N = 32, BC = 8, NFILT = 4, M = N / L;
  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] sel = '0;
  logic [M-1:0][L-1:0][BC-1:0] c;
  int checks = 0, failures = 0, cur = 0;

  coef_storage_unit dut (.clk, .rst_n, .en, .sel, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_set(int f);
    for (int m = 0; m < M; m++)
      for (int j = 0; j < L; j++) begin
        int i = m * L + j;
        int exp = (37 * (f + 1) * (i + 1) + 11 * f) % 256;
        checks++;
        if (int'(c[m][j]) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL f=%0d c[%0d][%0d]=%0d exp %0d", f, m, j, c[m][j], exp);
        end
      end
  endtask

  initial begin
    sel = 2'd3;
    @(posedge clk); #1;
    rst_n = 1;
    check_set(0);
    for (int t = 0; t < 200; t++) begin
      automatic logic go = ($urandom % 3) != 0;
      en  = go;
      sel = 2'($urandom);
      @(posedge clk); #1;
      if (go) cur = int'(sel);
      check_set(cur);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
