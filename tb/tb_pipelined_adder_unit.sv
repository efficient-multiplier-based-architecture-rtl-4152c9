// tb_pipelined_adder_unit -- self-check of the transpose-form adder chain.
// Feeds a random sequence of partial-output blocks r_k^m (with idle cycles
// where en is low) and checks each output block against
//   y_k = sum_{m=0}^{M-1} r_{k-(M-1-m)}^m   (mod 2^ACC_W),
// with blocks before the start counted as zero; k counts accepted blocks.
module tb_pipelined_adder_unit;
  localparam int unsigned L = 8, M = 4, ACC_W = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [M-1:0][L-1:0][ACC_W-1:0] r;
  logic [L-1:0][ACC_W-1:0]        y;
  int checks = 0, failures = 0, idle = 0;
  logic [M-1:0][L-1:0][ACC_W-1:0] past[$];   // accepted r blocks, oldest first

  pipelined_adder_unit dut (.clk, .rst_n, .en, .r, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = '0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic go;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) r[m][l] = ACC_W'($urandom);
      #1;
      // current block is r; older ones are in past
      for (int l = 0; l < L; l++) begin
        automatic logic [ACC_W-1:0] exp = r[M-1][l];
        for (int m = 0; m < M - 1; m++) begin
          automatic int back = M - 1 - m;               // blocks ago
          if (past.size() >= back) exp += past[past.size() - back][m][l];
        end
        checks++;
        if (y[l] != exp) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d l=%0d got %0d exp %0d", t, l, y[l], exp);
        end
      end
      go = ($urandom % 4) != 0;
      en = go;
      @(posedge clk); #1;
      en = 0;
      if (go) past.push_back(r); else idle++;
    end
    checks++;
    if (idle == 0) begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
