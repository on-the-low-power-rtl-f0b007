// df_fir_mac: conventional single-MAC DSP datapath running the direct-form (DF)
// FIR filter with coefficients in any order (Scheme III).
//
// Per sample: x(n) is pushed into the sample delay line and the accumulator is
// cleared; then, for each entry of the coefficient memory in execution order,
// h(k) (coefficient bus) is multiplied by x(n-k) (delay line read at delay k)
// and the product added into the accumulator; finally y(n) is taken from the
// accumulator. Ordering the coefficients lowers the switching at the
// multiplier's coefficient input without changing the datapath; the data input
// changes at every multiplication, as in any DF filter.
// Timing: x accepted in one cycle, L multiply-accumulate cycles, one output
// cycle, y_valid one cycle later; with x_valid held high a sample takes L + 2
// cycles. Load the coefficients as for tdf_fir_dsp, then pulse cfg_start; set-up
// clears the delay line (samples before the first read as zero) in one cycle.
// The handshake, the cycle counts and the 40-bit accumulator are this design's.
module df_fir_mac #(
  parameter int unsigned MULT_W  = fir_lp_pkg::MULT_W_DEF,
  parameter int unsigned N_MAX   = fir_lp_pkg::N_MAX_DEF,
  parameter int unsigned PCV_W   = fir_lp_pkg::PCV_W_DEF,
  parameter int unsigned STAGE_W = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  parameter int unsigned LEN_W   = $clog2(N_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [STAGE_W-1:0] cfg_pos,
  input  logic [STAGE_W-1:0] cfg_stage,
  input  logic [MULT_W-1:0]  cfg_coef,
  input  logic               cfg_start,
  input  logic [LEN_W-1:0]   cfg_taps,
  output logic               ready,
  input  logic               x_valid,
  output logic               x_ready,
  input  logic [MULT_W-1:0]  x_data,
  output logic               y_valid,
  output logic [PCV_W-1:0]   y_data,
  output logic               mac_step
);

  typedef enum logic [2:0] {ST_IDLE, ST_CLEAR, ST_READY, ST_MAC, ST_OUT} state_e;

  state_e              state;
  logic [LEN_W-1:0]    taps;
  logic [STAGE_W-1:0]  idx;
  logic [PCV_W-1:0]    acc, acc_sum;
  logic [STAGE_W-1:0]  cmem_rstage;
  logic [MULT_W-1:0]   coef_bus, data_bus;
  logic [2*MULT_W-1:0] prod;
  logic                push;

  logic [LEN_W-1:0] taps_req;
  always_comb begin
    taps_req = cfg_taps;
    if (taps_req == '0) taps_req = LEN_W'(1);
    if (32'(taps_req) > N_MAX) taps_req = LEN_W'(N_MAX);
  end

  coef_memory #(.COEF_W(MULT_W), .N_MAX(N_MAX)) u_cmem (
    .clk, .we(cfg_we), .waddr(cfg_pos), .wcoef(cfg_coef), .wstage(cfg_stage),
    .raddr(idx), .rcoef(coef_bus), .rstage(cmem_rstage));

  sample_delay_line #(.W(MULT_W), .N_MAX(N_MAX)) u_dline (
    .clk, .rst_n, .clear(state == ST_CLEAR), .len(taps), .push, .din(x_data),
    .tap(cmem_rstage), .dout(data_bus));

  bw_multiplier #(.W(MULT_W)) u_mult (.a(data_bus), .b(coef_bus), .p(prod));

  pcv_adder #(.PROD_W(2*MULT_W), .PCV_W(PCV_W)) u_add (.prod, .addend(acc), .sum(acc_sum));

  assign ready    = (state == ST_READY);
  assign x_ready  = ready && !cfg_start;
  assign push     = x_ready && x_valid;
  assign mac_step = (state == ST_MAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      taps    <= LEN_W'(1);
      idx     <= '0;
      acc     <= '0;
      y_valid <= 1'b0;
      y_data  <= '0;
    end else begin
      y_valid <= 1'b0;
      unique case (state)
        ST_IDLE, ST_READY: begin
          if (cfg_start) begin
            taps  <= taps_req;
            state <= ST_CLEAR;
          end else if (push) begin
            acc   <= '0;
            idx   <= '0;
            state <= ST_MAC;
          end
        end
        ST_CLEAR: state <= ST_READY;
        ST_MAC: begin
          acc <= acc_sum;
          if (32'(idx) == 32'(taps) - 1) state <= ST_OUT;
          else idx <= idx + 1'b1;
        end
        ST_OUT: begin
          y_data  <= acc;
          y_valid <= 1'b1;
          state   <= ST_READY;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   state == ST_MAC |-> 32'(cmem_rstage) < 32'(taps));

endmodule
