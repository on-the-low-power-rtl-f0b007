// pcv_adder: the adder of the filter datapath.
//
// Adds the sign-extended product from the multiplier to a wide addend: in the
// transposed direct form the addend is PCV_{k+1}(n-1), the output of the next
// filter stage for the previous sample, read from the precalculated value
// memory, and the sum is PCV_k(n); in the direct form the addend is the
// accumulator. Combinational, modulo 2^PCV_W (no saturation: the default width
// has enough guard bits for 89 full-scale terms, a choice of this design).
module pcv_adder #(
  parameter int unsigned PROD_W = 2*fir_lp_pkg::MULT_W_DEF,
  parameter int unsigned PCV_W  = fir_lp_pkg::PCV_W_DEF
) (
  input  logic [PROD_W-1:0] prod,
  input  logic [PCV_W-1:0]  addend,
  output logic [PCV_W-1:0]  sum
);

  logic [PCV_W-1:0] prod_ext;
  assign prod_ext = PCV_W'($signed(prod));
  assign sum      = addend + prod_ext;

endmodule
