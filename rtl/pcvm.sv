// pcvm: precalculated value memory of the transposed-direct-form filter.
//
// Stores the output of every filter stage from one sample to the next (the
// delays between the adders of the TDF structure), plus the extra copies that
// processing the stages out of order needs. One combinational read port drives
// data bus II (adder input and filter output); a separate synchronous write port
// is the write-back path from the adder, which lets a multiply-add-store finish
// in one cycle. Depth 2*N_MAX covers the worst execution order of N_MAX stages.
// No reset: the controller writes zeros to every used location before filtering,
// as the scheme requires (all PCVs are zero before the first sample). The
// separate write-back path follows the modified DSP architecture; the
// combinational read and the depth rule are this design's choices.
module pcvm #(
  parameter int unsigned PCV_W  = fir_lp_pkg::PCV_W_DEF,
  parameter int unsigned DEPTH  = 2*fir_lp_pkg::N_MAX_DEF,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [PCV_W-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [PCV_W-1:0]  rdata
);

  logic [PCV_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
