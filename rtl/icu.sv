// icu -- inner cell unit: one row of the block inner product.
//
// Cell l of an inner-product unit multiplies row l of the sample matrix S_k,
//   row[j] = x(kL-l-j), j = 0..L-1,
// element by element with the short-weight vector c_m = h(mL+j), j = 0..L-1,
// and adds the L products, giving the partial output r(kL-l). Every product
// comes from an 8x8 Vedic multiplier (operands narrower than 8 bits are
// zero-extended); the L products are summed by a plain adder tree and the
// sum is kept to ACC_W bits, i.e. modulo 2^ACC_W, the width of the
// accumulation registers. The use of Vedic multipliers is the architecture's;
// the adder-tree form and the truncation point are this design's choices.
//
// Interface: row[L] (B bits each), coef[L] (BC bits each) in, r (ACC_W bits)
// out. Combinational.
module icu #(
  parameter int unsigned B     = fir_pkg::B_DEF,
  parameter int unsigned BC    = fir_pkg::BC_DEF,
  parameter int unsigned L     = fir_pkg::L_DEF,
  parameter int unsigned ACC_W = fir_pkg::ACC_W_DEF
) (
  input  logic [L-1:0][B-1:0]  row,
  input  logic [L-1:0][BC-1:0] coef,
  output logic [ACC_W-1:0]     r
);

  if (B > 8 || BC > 8) begin : g_width_check
    $error("icu: the Vedic multiplier takes operands of at most 8 bits");
  end

  logic [L-1:0][15:0] prod;

  for (genvar j = 0; j < L; j++) begin : g_mul
    vedic_mul8x8 u_mul (
      .a(8'(row[j])),
      .b(8'(coef[j])),
      .p(prod[j])
    );
  end

  always_comb begin
    r = '0;
    for (int j = 0; j < L; j++)
      r = r + ACC_W'(prod[j]);
  end

endmodule
