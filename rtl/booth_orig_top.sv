// booth_orig_top: the two original-Booth multipliers side by side.
//
// Holds the carry-propagate multiplier with look-ahead scan (CPA-impr) and
// the carry-save multiplier with look-ahead scan (CSA), both N x N bit two's
// complement iterative multipliers with a data-dependent number of
// iterations. They are independent units, each with its own start/busy/done
// handshake and operands (see booth_cpa_mult and booth_csa_mult for timing).
// The plain CPA variant without look-ahead is booth_cpa_mult with
// LOOKAHEAD=0, selected here with CPA_LOOKAHEAD. Shared clock and reset.
module booth_orig_top
  import booth_pkg::*;
#(
  parameter int unsigned N             = N_DEFAULT,
  parameter bit          CPA_LOOKAHEAD = 1'b1,
  localparam int unsigned CW           = $clog2(N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // carry-propagate multiplier
  input  logic           cpa_start,
  input  logic [N-1:0]   cpa_multiplicand,
  input  logic [N-1:0]   cpa_multiplier,
  output logic           cpa_busy,
  output logic           cpa_done,
  output logic [2*N-1:0] cpa_product,
  output logic [CW-1:0]  cpa_iterations,
  // carry-save multiplier
  input  logic           csa_start,
  input  logic [N-1:0]   csa_multiplicand,
  input  logic [N-1:0]   csa_multiplier,
  output logic           csa_busy,
  output logic           csa_done,
  output logic [2*N-1:0] csa_product,
  output logic [CW-1:0]  csa_iterations
);

  booth_cpa_mult #(.N(N), .LOOKAHEAD(CPA_LOOKAHEAD)) u_cpa (
    .clk, .rst_n, .start(cpa_start), .multiplicand(cpa_multiplicand),
    .multiplier(cpa_multiplier), .busy(cpa_busy), .done(cpa_done),
    .product(cpa_product), .iterations(cpa_iterations)
  );

  booth_csa_mult #(.N(N)) u_csa (
    .clk, .rst_n, .start(csa_start), .multiplicand(csa_multiplicand),
    .multiplier(csa_multiplier), .busy(csa_busy), .done(csa_done),
    .product(csa_product), .iterations(csa_iterations)
  );

endmodule
