// register_unit -- forms the L x L sample matrix S_k from a stream of blocks.
//
// Every cycle with en high it takes one block of L samples,
//   x_blk[l] = x(kL-l), l = 0..L-1 (newest sample first),
// and keeps it in an L-sample register, while the newest L-1 samples of the
// block before move into an (L-1)-sample register. Row l of S_k is
//   s[l][j] = x(kL-l-j), j = 0..L-1,
// which reaches back L-1 samples into the previous block; the rows are pure
// wiring from those 2L-1 registered samples. Taking one block per cycle and
// presenting all L rows in parallel is the architecture's; registering the
// current block (so S_k appears the cycle after x_k), the clock enable and the
// synchronous active-low reset to zero are this design's choices.
//
// Interface: clk, rst_n, en, x_blk[L] (B bits) in; s[L][L] (B bits) out,
// valid from the cycle after the block was taken.
module register_unit #(
  parameter int unsigned B = fir_pkg::B_DEF,
  parameter int unsigned L = fir_pkg::L_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [L-1:0][B-1:0]        x_blk,
  output logic [L-1:0][L-1:0][B-1:0] s
);

  logic [L-1:0][B-1:0] cur;    // x(kL-i),   i = 0..L-1
  logic [L-2:0][B-1:0] prev;   // x(kL-L-i), i = 0..L-2

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur  <= '0;
      prev <= '0;
    end else if (en) begin
      cur  <= x_blk;
      prev <= cur[L-2:0];
    end
  end

  // The element of index i = l + j is x(kL-i): from cur when i < L, else
  // from prev[i-L].
  always_comb begin
    for (int l = 0; l < L; l++)
      for (int j = 0; j < L; j++)
        s[l][j] = (l + j < L) ? cur[l+j] : prev[l+j-L];
  end

endmodule
