// block_fir_top -- reconfigurable transpose-form block FIR filter.
//
// Filters a sample stream L samples at a time with one of NFILT stored
// N-tap filters, producing L outputs per clock:
//   y(n) = sum_{i=0}^{N-1} h_sel(i) x(n-i)   (mod 2^ACC_W).
// The N taps are cut into M = N/L short-weight vectors c_m = h(mL..mL+L-1).
// The register unit (RU) turns the incoming block x_k into the L x L matrix
// S_k whose row l is x(kL-l) .. x(kL-l-L+1). All M inner-product units (IPUs)
// share S_k; IPU m+1 multiplies it by c_{M-1-m} from the coefficient storage
// unit (CSU), using L*L Vedic 8x8 multipliers. The pipelined adder unit (PAU)
// then adds the M partial blocks through a transpose-form register chain, so
// y_k = sum_m S_{k-m} c_m. That structure, L = 8, the 8-bit operands and the
// B+B' = 16 bit accumulation width are the architecture's; N = 32, NFILT = 4,
// the default coefficient table, the valid handshake and reset are this
// design's choices.
//
// Interface:
//   in_valid, x_blk[L], sel : a block x_blk[l] = x(kL-l) (newest first) and the
//                             filter to use for it, taken on a clock edge
//                             with in_valid high; one block per cycle at most.
//   out_valid, y_blk[L]     : y_blk[l] = y(kL-l), valid the cycle after the
//                             block was taken (latency 1) and held until the
//                             next block is taken.
// Gaps in in_valid freeze the whole filter. Changing sel takes effect with
// the block it comes with; the M-1 blocks after a change mix the old and
// new filters, as in any transpose-form filter, and are then clean.
// Reset (rst_n low, synchronous) clears the sample history and the PAU
// registers and selects filter 0.
module block_fir_top #(
  parameter int unsigned B     = fir_pkg::B_DEF,
  parameter int unsigned BC    = fir_pkg::BC_DEF,
  parameter int unsigned L     = fir_pkg::L_DEF,
  parameter int unsigned N     = fir_pkg::N_DEF,
  parameter int unsigned ACC_W = fir_pkg::ACC_W_DEF,
  parameter int unsigned NFILT = fir_pkg::NFILT_DEF,
  parameter fir_pkg::coef_table_t COEFS = fir_pkg::default_coefs(),
  localparam int unsigned M     = N / L,
  localparam int unsigned SEL_W = (NFILT > 1) ? $clog2(NFILT) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [SEL_W-1:0]          sel,
  input  logic [L-1:0][B-1:0]       x_blk,
  output logic                      out_valid,
  output logic [L-1:0][ACC_W-1:0]   y_blk
);

  logic [L-1:0][L-1:0][B-1:0]     s;     // S_k
  logic [M-1:0][L-1:0][BC-1:0]    c;     // c_0 .. c_{M-1}
  logic [M-1:0][L-1:0][ACC_W-1:0] r;     // r_k^0 .. r_k^{M-1}

  register_unit #(.B(B), .L(L)) u_ru (
    .clk, .rst_n, .en(in_valid), .x_blk, .s
  );

  coef_storage_unit #(.L(L), .N(N), .BC(BC), .NFILT(NFILT), .COEFS(COEFS)) u_csu (
    .clk, .rst_n, .en(in_valid), .sel, .c
  );

  for (genvar m = 0; m < M; m++) begin : g_ipu
    ipu #(.B(B), .BC(BC), .L(L), .ACC_W(ACC_W)) u_ipu (
      .s   (s),
      .coef(c[M-1-m]),
      .r   (r[m])
    );
  end

  pipelined_adder_unit #(.L(L), .M(M), .ACC_W(ACC_W)) u_pau (
    .clk, .rst_n, .en(in_valid), .r, .y(y_blk)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
