// tb_ipu -- self-check of the inner-product unit.
// Drives random L x L matrices and weight vectors and compares each of the L
// outputs with its row's inner product, modulo 2^ACC_W.
module tb_ipu;
  localparam int unsigned B = 8, BC = 8, L = 8, ACC_W = 16;
  logic [L-1:0][L-1:0][B-1:0] s;
  logic [L-1:0][BC-1:0]       coef;
  logic [L-1:0][ACC_W-1:0]    r;
  int checks = 0, failures = 0;

  ipu dut (.s, .coef, .r);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < L; j++) coef[j] = 8'($urandom);
      for (int l = 0; l < L; l++)
        for (int j = 0; j < L; j++) s[l][j] = 8'($urandom);
      #1;
      for (int l = 0; l < L; l++) begin
        automatic longint sum = 0;
        for (int j = 0; j < L; j++) sum += longint'(s[l][j]) * longint'(coef[j]);
        checks++;
        if (r[l] != ACC_W'(sum)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d row %0d got %0d exp %0d", t, l, r[l], ACC_W'(sum));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
