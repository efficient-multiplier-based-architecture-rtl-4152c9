// tb_register_unit -- self-check of the sample-matrix former.
// Streams numbered blocks (with random idle cycles and one mid-run reset) into
// the unit and, after every clock, checks all L x L matrix entries against a
// sample history kept by the testbench: s[l][j] must be x(n0-l-j), where n0
// is the newest accepted sample and samples before the start or the last
// reset read as 0. Checks that idle cycles hold the matrix.
module tb_register_unit;
  localparam int unsigned B = 8, L = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [L-1:0][B-1:0]       x_blk;
  logic [L-1:0][L-1:0][B-1:0] s;
  int checks = 0, failures = 0, idle_cycles = 0;
  int hist[$];          // accepted samples, oldest first

  register_unit dut (.clk, .rst_n, .en, .x_blk, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample(int back);   // x(n0 - back)
    int idx = hist.size() - 1 - back;
    return (idx >= 0) ? hist[idx] : 0;
  endfunction

  task automatic check_matrix();
    for (int l = 0; l < L; l++)
      for (int j = 0; j < L; j++) begin
        checks++;
        if (int'(s[l][j]) != sample(l + j)) begin
          failures++;
          if (failures < 10) $display("FAIL s[%0d][%0d]=%0d exp %0d", l, j, s[l][j], sample(l + j));
        end
      end
  endtask

  initial begin
    x_blk = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 300; k++) begin
      automatic logic go = ($urandom % 4) != 0;
      if (k == 150) begin               // reset in the middle of the stream
        rst_n <= 0; en <= 0;
        @(posedge clk); #1;
        hist.delete();
        rst_n <= 1;
        check_matrix();
      end
      en <= go;
      for (int l = 0; l < L; l++) x_blk[l] = 8'($urandom);
      @(posedge clk); #1;
      if (go) begin
        for (int l = L - 1; l >= 0; l--) hist.push_back(int'(x_blk[l]));   // oldest first
      end else idle_cycles++;
      check_matrix();
    end
    checks++;
    if (idle_cycles == 0) begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
