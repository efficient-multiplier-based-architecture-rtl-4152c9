// pipelined_adder_unit -- transpose-form accumulation of the inner products.
//
// Takes the M blocks of partial outputs r^0..r^{M-1} (L words each) and forms
//   p^0 = r^0,  p^m = r^m + D(p^{m-1}),  y = p^{M-1}
// where D is one register stage, advanced when en is high. With inner-product
// unit m+1 working on the short-weight vector c_{M-1-m}, this adds
//   y_k = S_k c_0 + S_{k-1} c_1 + ... + S_{k-M+1} c_{M-1},
// the block form of the FIR sum. That takes L(M-1) adders and L(M-1)
// registers, each ACC_W = B+B' bits wide, as the architecture specifies; sums
// wrap modulo 2^ACC_W. The output is combinational from the last adder (no
// output register). Reset clears the registers (this design's choice).
//
// Interface: clk, rst_n, en, r[M][L] (ACC_W bits) in; y[L] (ACC_W bits) out.
module pipelined_adder_unit #(
  parameter int unsigned L     = fir_pkg::L_DEF,
  parameter int unsigned M     = fir_pkg::N_DEF / fir_pkg::L_DEF,
  parameter int unsigned ACC_W = fir_pkg::ACC_W_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic [M-1:0][L-1:0][ACC_W-1:0] r,
  output logic [L-1:0][ACC_W-1:0]      y
);

  if (M == 1) begin : g_single
    assign y = r[0];
  end else begin : g_chain
    logic [M-2:0][L-1:0][ACC_W-1:0] d;    // the L(M-1) registers
    logic [M-1:0][L-1:0][ACC_W-1:0] p;    // adder outputs (p[0] = r[0])

    always_comb begin
      p[0] = r[0];
      for (int m = 1; m < M; m++)
        for (int l = 0; l < L; l++)
          p[m][l] = r[m][l] + d[m-1][l];
    end

    always_ff @(posedge clk) begin
      if (!rst_n)  d <= '0;
      else if (en) d <= p[M-2:0];
    end

    assign y = p[M-1];
  end

endmodule
