// bw_multiplier: W x W two's complement array multiplier, modified Baugh-Wooley form.
//
// Works on the partial-product array directly, as a gate-level array multiplier
// does: bit a[i]&b[j] has weight 2^(i+j); the bits that involve exactly one sign
// bit are inverted, and ones are added at weights 2^W and 2^(2W-1). The rows are
// reduced with one carry-save adder per row and the last sum/carry pair is
// added by a carry-propagate adder. The result equals $signed(a)*$signed(b).
// Purely combinational; a is the data operand, b the coefficient operand.
// The Baugh-Wooley type is the one the power figures of this architecture were
// measured on; the row-by-row carry-save reduction is this design's choice.
module bw_multiplier #(
  parameter int unsigned W = fir_lp_pkg::MULT_W_DEF
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  logic [2*W-1:0] row [W+1];   // W partial-product rows plus the correction row

  always_comb begin
    for (int j = 0; j < W; j++) begin
      row[j] = '0;
      for (int i = 0; i < W; i++) begin
        logic bit_ij;
        bit_ij = a[i] & b[j];
        // exactly one of the two bits is a sign bit: invert
        if ((i == W-1) != (j == W-1)) bit_ij = ~bit_ij;
        row[j][i+j] = bit_ij;
      end
    end
    row[W] = '0;
    row[W][W]     = 1'b1;
    row[W][2*W-1] = 1'b1;
  end

  // Carry-save reduction, one row at a time (the array structure).
  logic [2*W-1:0] s_vec, c_vec;
  always_comb begin
    s_vec = row[0];
    c_vec = row[1];
    for (int r = 2; r <= W; r++) begin
      logic [2*W-1:0] s_n, c_n;
      s_n   = s_vec ^ c_vec ^ row[r];
      c_n   = ((s_vec & c_vec) | (s_vec & row[r]) | (c_vec & row[r])) << 1;
      s_vec = s_n;
      c_vec = c_n;
    end
  end

  assign p = s_vec + c_vec;

endmodule
