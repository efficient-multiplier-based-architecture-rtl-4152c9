// tb_fir_8tap -- end-to-end self-check of the block FIR filter with one block
// of 8 taps (N = L = 8, a single inner-product unit and no adder chain), the
// size of an 8-coefficient, 8-sample-per-block filter. Otherwise as the
// default-parameter test (8-bit samples and coefficients, 16-bit
// outputs, 4 filters).
//
// Sample n of the stream sits in block k = n / L at x_blk[L-1-(n mod L)]
// (newest first). The reference is the direct FIR sum
//   y(n) = sum_i h_{f(i)}(i) x(n-i),
// evaluated at full precision and compared modulo 2^16, where h_f is the
// default table formula h_f(i) = (37*(f+1)*(i+1) + 11*f) mod 256 and f(i) is
// the filter selected with the block that held x(n-i)'s tap group (the
// transpose form applies c_m to the block m blocks back with the select that
// came with that block). The run covers: an impulse (output = impulse
// response), random data, filter switches, idle cycles, sums that wrap the
// 16-bit registers and a reset in mid-stream. The latency of one cycle is
// checked through out_valid. Each of these is counted and a failure is
// counted for any that never happened.
module tb_fir_8tap;
  import fir_pkg::*;
  localparam int unsigned B = B_DEF, L = L_DEF, N = 8, ACC_W = ACC_W_DEF;
  localparam int unsigned NFILT = NFILT_DEF, M = N / L;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0]                  sel = '0;
  logic [L-1:0][B-1:0]         x_blk = '0;
  logic                        out_valid;
  logic [L-1:0][ACC_W-1:0]     y_blk;

  block_fir_top #(.N(N)) dut (.clk, .rst_n, .in_valid, .sel, .x_blk, .out_valid, .y_blk);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_switch = 0, n_idle = 0, n_wrap = 0, n_reset = 0, n_impulse = 0, n_blocks = 0;
  int xs[$];       // accepted samples since the last reset, sample index order
  int sels[$];     // select of each accepted block

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(int f, int i);
    return (37 * (f + 1) * (i + 1) + 11 * f) % 256;
  endfunction

  function automatic longint ref_y(int n);
    longint acc = 0;
    int k = n / L;
    for (int i = 0; i < N; i++) begin
      int kb = k - (i / L);          // block whose select c_{i/L} was applied with
      if (n - i >= 0 && kb >= 0) acc += longint'(h(sels[kb], i)) * longint'(xs[n - i]);
    end
    return acc;
  endfunction

  // one accepted block
  task automatic push_block(int f, int gen);   // gen: 0 random, 1 impulse start, 2 zeros, 3 small
    int n0 = xs.size();
    for (int i = 0; i < L; i++) begin
      int v;
      case (gen)
        1:       v = (i == 0) ? 1 : 0;
        2:       v = 0;
        3:       v = $urandom % 4;
        default: v = $urandom % 256;
      endcase
      xs.push_back(v);
      x_blk[L-1-i] = B'(v);
    end
    if (sels.size() > 0 && sels[sels.size()-1] != f) n_switch++;
    sels.push_back(f);
    sel      = 2'(f);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    n_blocks++;
    // latency 1: the result is there right after the edge
    checks++;
    if (!out_valid) begin failures++; $display("FAIL out_valid low after block %0d", n_blocks); end
    for (int l = 0; l < L; l++) begin
      int n = n0 + L - 1 - l;
      longint e = ref_y(n);
      if (e >= 64'(1) << ACC_W) n_wrap++;
      checks++;
      if (y_blk[l] != ACC_W'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL y(%0d) got %0d exp %0d", n, y_blk[l], ACC_W'(e));
      end
    end
    if (gen == 1) n_impulse++;
  endtask

  task automatic idle_cycle();
    logic [L-1:0][ACC_W-1:0] hold = y_blk;
    in_valid = 0;
    x_blk    = {L{8'($urandom)}};
    sel      = 2'($urandom);
    @(posedge clk); #1;
    n_idle++;
    checks++;
    if (out_valid || y_blk != hold) begin
      failures++; $display("FAIL idle cycle changed the output or raised out_valid");
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    xs.delete(); sels.delete();
    n_reset++;
  endtask

  initial begin
    do_reset();
    n_reset = 0;
    // impulse through filter 0 and filter 2: outputs are h_f(0..N-1)
    push_block(0, 1);
    for (int k = 0; k < M; k++) push_block(0, 2);
    do_reset();
    push_block(2, 1);
    for (int k = 0; k < M; k++) push_block(2, 2);
    // explicit impulse-response check against the table for filter 2
    for (int i = 0; i < N; i++) begin
      checks++;
      if (ref_y(i) != longint'(h(2, i))) begin failures++; $display("FAIL impulse ref"); end
    end
    // random stream with switches, idle cycles and small-valued stretches
    for (int t = 0; t < 400; t++) begin
      automatic int f = (t / 37) % NFILT;
      if ($urandom % 5 == 0) idle_cycle();
      push_block(f, ((t / 50) % 3 == 2) ? 3 : 0);
      if (t == 250) do_reset();
    end
    checks++;
    if (n_switch == 0 || n_idle == 0 || n_wrap == 0 || n_reset == 0 || n_impulse == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("blocks=%0d filter_switches=%0d idle_cycles=%0d wrapped_outputs=%0d resets=%0d impulses=%0d",
             n_blocks, n_switch, n_idle, n_wrap, n_reset, n_impulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
