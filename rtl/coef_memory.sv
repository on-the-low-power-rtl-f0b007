// coef_memory: coefficient memory holding the coefficient set in execution order.
//
// Entry i is the coefficient applied at the i-th multiplication of every sample
// together with the index k of the filter stage it belongs to, so a reordered
// ("min") set and the plain ("norm") set are loaded the same way. The order is
// fixed before filtering starts and is not changed by the hardware.
// One synchronous write port (load) and one combinational read port (the
// coefficient bus to the multiplier, plus the stage index to the controller).
// The stage tag and the combinational read are this design's choices.
module coef_memory #(
  parameter int unsigned COEF_W  = fir_lp_pkg::MULT_W_DEF,
  parameter int unsigned N_MAX   = fir_lp_pkg::N_MAX_DEF,
  parameter int unsigned STAGE_W = (N_MAX > 1) ? $clog2(N_MAX) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [STAGE_W-1:0] waddr,
  input  logic [COEF_W-1:0]  wcoef,
  input  logic [STAGE_W-1:0] wstage,
  input  logic [STAGE_W-1:0] raddr,
  output logic [COEF_W-1:0]  rcoef,
  output logic [STAGE_W-1:0] rstage
);

  logic [COEF_W-1:0]  coef_mem  [N_MAX];
  logic [STAGE_W-1:0] stage_mem [N_MAX];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < N_MAX)) begin
      coef_mem[waddr]  <= wcoef;
      stage_mem[waddr] <= wstage;
    end
  end

  always_comb begin
    if (32'(raddr) < N_MAX) begin
      rcoef  = coef_mem[raddr];
      rstage = stage_mem[raddr];
    end else begin
      rcoef  = '0;
      rstage = '0;
    end
  end

endmodule
