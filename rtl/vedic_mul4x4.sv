// vedic_mul4x4 -- unsigned 4x4 -> 8 bit multiplier, Urdhva Tiryagbhyam
// ("vertically and crosswise") scheme.
//
// The product is built column by column: column k adds every partial product
// bit a[i]&b[j] with i+j == k (the "crosswise" terms) and the carry handed on
// from column k-1. The least significant bit of that column sum is product
// bit k and the rest is carried into column k+1; the carry left after column 6
// gives product bit 7. The use of this sutra for the 4x4 building blocks is the
// architecture's; the column-sum formulation of it is this design's choice.
//
// Interface: a, b (4 bits each) in, p = a*b (8 bits) out. Purely
// combinational, no clock.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  always_comb begin
    logic [3:0] col;    // column sum: at most 4 partial bits plus a carry of 3
    logic [2:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 7; k++) begin
      col = 4'(carry);
      for (int i = 0; i < 4; i++)
        if (k - i >= 0 && k - i < 4)
          col = col + 4'(a[i] & b[k-i]);
      p[k]  = col[0];
      carry = col[3:1];
    end
    p[7] = carry[0];
  end

endmodule
