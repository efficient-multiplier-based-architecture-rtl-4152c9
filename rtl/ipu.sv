// ipu -- inner product unit: matrix-vector product S_k * c_m.
//
// Holds L inner cells, one per row of the L x L sample matrix S_k. Cell l
// receives row l and the common short-weight vector c_m and produces r[l], so
// the unit delivers the block of L partial outputs r_k^m = S_k c_m in one pass.
// The split into L cells sharing one weight vector is the architecture's.
//
// Interface: s[L][L] (B bits), coef[L] (BC bits) in, r[L] (ACC_W bits) out.
// Combinational.
module ipu #(
  parameter int unsigned B     = fir_pkg::B_DEF,
  parameter int unsigned BC    = fir_pkg::BC_DEF,
  parameter int unsigned L     = fir_pkg::L_DEF,
  parameter int unsigned ACC_W = fir_pkg::ACC_W_DEF
) (
  input  logic [L-1:0][L-1:0][B-1:0] s,
  input  logic [L-1:0][BC-1:0]       coef,
  output logic [L-1:0][ACC_W-1:0]    r
);

  for (genvar l = 0; l < L; l++) begin : g_cell
    icu #(.B(B), .BC(BC), .L(L), .ACC_W(ACC_W)) u_icu (
      .row (s[l]),
      .coef(coef),
      .r   (r[l])
    );
  end

endmodule
