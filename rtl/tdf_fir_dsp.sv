// tdf_fir_dsp: single-multiplier DSP datapath for transposed-direct-form FIR
// filtering (Schemes I and II).
//
// Blocks and buses:
//   data bus I       x(n) from the converter into the sample register x_q, which
//                    drives the multiplier data input unchanged for all the
//                    multiplications of one sample; this is what keeps the
//                    switching activity at that input low.
//   coefficient bus  coefficient memory (execution order) to the multiplier.
//   data bus II      PCVM read port to the adder and to the output register;
//                    a separate write-back path from the adder (or the copy and
//                    zero sources) to the PCVM write port.
// tdf_control sequences the memories. One multiply-add-store per cycle, one
// extra cycle per save transfer; y(n) = PCV_0(n) leaves through y_data with a
// one-cycle y_valid pulse, L + S + 2 cycles after x(n) was accepted.
// Scheme I or II is chosen only by the order of the coefficients loaded.
// Load: write every position 0..L-1 through cfg_we/cfg_pos/cfg_stage/cfg_coef,
// then pulse cfg_start with cfg_taps = L; ready rises when set-up is done.
// The output is the full-precision PCV_0 (two's complement, PCV_W bits).
// The blocks and the three buses are those of the modified DSP architecture for
// TDF filtering; the register on data bus I, the point-to-point bus wiring, the
// output register and the asynchronous reset are this design's choices.
module tdf_fir_dsp #(
  parameter int unsigned MULT_W  = fir_lp_pkg::MULT_W_DEF,
  parameter int unsigned N_MAX   = fir_lp_pkg::N_MAX_DEF,
  parameter int unsigned PCV_W   = fir_lp_pkg::PCV_W_DEF,
  parameter int unsigned STAGE_W = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  parameter int unsigned LEN_W   = $clog2(N_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // coefficient load and set-up
  input  logic               cfg_we,
  input  logic [STAGE_W-1:0] cfg_pos,
  input  logic [STAGE_W-1:0] cfg_stage,
  input  logic [MULT_W-1:0]  cfg_coef,
  input  logic               cfg_start,
  input  logic [LEN_W-1:0]   cfg_taps,
  output logic               ready,
  // samples in (from the ADC) and out (to the DAC)
  input  logic               x_valid,
  output logic               x_ready,
  input  logic [MULT_W-1:0]  x_data,
  output logic               y_valid,
  output logic [PCV_W-1:0]   y_data,
  // activity
  output logic               mac_step,
  output logic               save_step
);
  import fir_lp_pkg::*;

  localparam int unsigned PADDR_W = $clog2(2*N_MAX);

  logic [STAGE_W-1:0] cmem_raddr, cmem_rstage;
  logic [MULT_W-1:0]  coef_bus;
  logic [PADDR_W-1:0] pcvm_raddr, pcvm_waddr;
  logic               pcvm_we;
  pcvm_wsel_e         pcvm_wsel;
  logic [PCV_W-1:0]   bus2_rd, bus2_wr, sum;
  logic [2*MULT_W-1:0] prod;
  logic               x_load, y_load;
  logic [MULT_W-1:0]  x_q;          // data bus I register

  coef_memory #(.COEF_W(MULT_W), .N_MAX(N_MAX)) u_cmem (
    .clk, .we(cfg_we), .waddr(cfg_pos), .wcoef(cfg_coef), .wstage(cfg_stage),
    .raddr(cmem_raddr), .rcoef(coef_bus), .rstage(cmem_rstage));

  tdf_control #(.N_MAX(N_MAX)) u_ctrl (
    .clk, .rst_n, .cfg_start, .cfg_taps, .ready,
    .x_valid, .x_ready, .x_load,
    .cmem_raddr, .cmem_rstage,
    .pcvm_raddr, .pcvm_waddr, .pcvm_we, .pcvm_wsel,
    .y_load, .mac_step, .save_step);

  bw_multiplier #(.W(MULT_W)) u_mult (.a(x_q), .b(coef_bus), .p(prod));

  pcv_adder #(.PROD_W(2*MULT_W), .PCV_W(PCV_W)) u_add (.prod, .addend(bus2_rd), .sum);

  pcvm #(.PCV_W(PCV_W), .DEPTH(2*N_MAX)) u_pcvm (
    .clk, .we(pcvm_we), .waddr(pcvm_waddr), .wdata(bus2_wr),
    .raddr(pcvm_raddr), .rdata(bus2_rd));

  always_comb begin
    unique case (pcvm_wsel)
      WSEL_SUM:  bus2_wr = sum;
      WSEL_COPY: bus2_wr = bus2_rd;
      default:   bus2_wr = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= '0;
      y_valid <= 1'b0;
      y_data  <= '0;
    end else begin
      if (x_load) x_q <= x_data;
      y_valid <= y_load;
      if (y_load) y_data <= bus2_rd;
    end
  end

endmodule
