// coef_storage_unit -- coefficient ROM of the reconfigurable filter.
//
// Holds the N coefficients of each of NFILT filters as N small ROMs, one per
// tap, each NFILT words deep and all addressed by the same filter select, so
// the whole coefficient set of the chosen filter appears in one cycle. The
// output is arranged as M = N/L short-weight vectors,
//   c[m][j] = h_sel(mL + j), j = 0..L-1,
// one per inner-product unit. One ROM per tap and a one-cycle read are the
// architecture's; NFILT, the ROM contents (parameter COEFS, default from
// fir_pkg::default_coefs) and the select register are this design's choices.
// The select is registered when en is high, together with the sample block in
// the register unit, so the coefficients and the sample matrix of a block
// line up; reset selects filter 0.
//
// Interface: clk, rst_n, en, sel in; c[M][L] (BC bits) out, valid the cycle
// after sel was taken.
module coef_storage_unit #(
  parameter int unsigned L     = fir_pkg::L_DEF,
  parameter int unsigned N     = fir_pkg::N_DEF,
  parameter int unsigned BC    = fir_pkg::BC_DEF,
  parameter int unsigned NFILT = fir_pkg::NFILT_DEF,
  parameter fir_pkg::coef_table_t COEFS = fir_pkg::default_coefs(),
  localparam int unsigned M     = N / L,
  localparam int unsigned SEL_W = (NFILT > 1) ? $clog2(NFILT) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [SEL_W-1:0]            sel,
  output logic [M-1:0][L-1:0][BC-1:0] c
);

  if (N % L != 0 || N > fir_pkg::N_MAX || NFILT > fir_pkg::NFILT_MAX) begin : g_size_check
    $error("coef_storage_unit: N must be a multiple of L and the table must fit fir_pkg limits");
  end

  logic [SEL_W-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (!rst_n)  sel_q <= '0;
    else if (en) sel_q <= sel;
  end

  for (genvar i = 0; i < N; i++) begin : g_tap
    logic [BC-1:0] rom [NFILT];
    for (genvar f = 0; f < NFILT; f++) begin : g_word
      assign rom[f] = COEFS[f][i][BC-1:0];
    end
    // A select beyond NFILT-1 reads filter 0.
    assign c[i/L][i%L] = (32'(sel_q) < NFILT) ? rom[sel_q] : rom[0];
  end

endmodule
