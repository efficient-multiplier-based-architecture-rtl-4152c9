// tb_icu -- self-check of one inner cell.
// Drives random rows and coefficient vectors (plus all-ones corner cases) and
// compares r with the inner product computed by integer arithmetic, modulo
// 2^ACC_W. Default parameters (L = 8, 8-bit operands, 16-bit sum).
module tb_icu;
  localparam int unsigned B = 8, BC = 8, L = 8, ACC_W = 16;
  logic [L-1:0][B-1:0]  row;
  logic [L-1:0][BC-1:0] coef;
  logic [ACC_W-1:0]     r;
  int checks = 0, failures = 0;

  icu dut (.row, .coef, .r);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      automatic longint sum = 0;
      for (int j = 0; j < L; j++) begin
        row[j]  = (t < 2) ? 8'hFF : 8'($urandom);
        coef[j] = (t < 1) ? 8'hFF : 8'($urandom);
        if (t == 2 && j != 3) coef[j] = '0;
        sum += longint'(row[j]) * longint'(coef[j]);
      end
      #1;
      checks++;
      if (r != ACC_W'(sum)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, r, ACC_W'(sum));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
