// vedic_mul8x8 -- unsigned 8x8 -> 16 bit Vedic multiplier.
//
// The operands are split into nibbles and four 4x4 Vedic multipliers form
//   m1 = a[3:0]*b[3:0]   m2 = a[7:4]*b[3:0]   m3 = a[3:0]*b[7:4]   m4 = a[7:4]*b[7:4]
// Three 8-bit adders then join the overlapping partial products:
//   ADDER 1: m5 = m3 + m2 (carry-out C, weight 2^12 in the product)
//   ADDER 2: m6 = m5 + m1[7:4]   -> p[7:4] = m6[3:0]
//   ADDER 3: p[15:8] = m4 + m7, with m7 = {000, C, m6[7:4]}
// p[3:0] is m1[3:0] directly. This structure is the architecture's. The
// carry-out of ADDER 2 also has weight 2^12; it is never 1 when C is 1
// (C = 1 forces m5 <= 194, so m5 + 15 < 256), so it is ORed with C into bit 4
// of m7. That carry is this design's addition: without it some products
// (for example 0xF2 * 0xFF) come out 4096 too small.
//
// Interface: a, b (8 bits) in, p = a*b (16 bits) out. Combinational.
module vedic_mul8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [7:0] m1, m2, m3, m4, m5, m7;
  logic [7:0] m6;
  logic       c1, c2;

  vedic_mul4x4 u_m1 (.a(a[3:0]), .b(b[3:0]), .p(m1));
  vedic_mul4x4 u_m2 (.a(a[7:4]), .b(b[3:0]), .p(m2));
  vedic_mul4x4 u_m3 (.a(a[3:0]), .b(b[7:4]), .p(m3));
  vedic_mul4x4 u_m4 (.a(a[7:4]), .b(b[7:4]), .p(m4));

  always_comb begin
    {c1, m5} = {1'b0, m3} + {1'b0, m2};            // ADDER 1
    {c2, m6} = {1'b0, m5} + {5'b0, m1[7:4]};       // ADDER 2
    m7       = {3'b000, c1 | c2, m6[7:4]};
    p[3:0]   = m1[3:0];
    p[7:4]   = m6[3:0];
    p[15:8]  = m4 + m7;                            // ADDER 3
  end

  // The two middle carries have the same weight and are exclusive.
  always_comb assert (!(c1 && c2)) else $error("vedic_mul8x8: ADDER 1 and ADDER 2 carries both set");

endmodule
