// fir_lowpower_dsp: low-power FIR filtering on a single-multiplier DSP, with the
// three multiplication schemes selectable.
//
// Two engines share the sample input (ADC side) and the output (DAC side):
//   scheme_sel = 0  tdf_fir_dsp: transposed direct form. The multiplier data
//                   input holds x(n) for a whole sample; loading the
//                   coefficients in stage order gives Scheme I, loading them in
//                   a low-Hamming-distance order gives Scheme II.
//   scheme_sel = 1  df_fir_mac: direct form on a plain MAC datapath with the
//                   coefficients in any order (Scheme III).
// Coefficient writes (cfg_we, cfg_pos, cfg_stage, cfg_coef) go to the engine
// named by scheme_sel at that moment. cfg_start latches scheme_sel as the active
// mode and starts that engine's set-up; samples then flow to the active engine
// only, the other one sits idle with its inputs still. A switch of scheme is
// thus a reload plus a cfg_start. Timing is that of the active engine:
// L + S + 2 cycles per sample (TDF, S save transfers) or L + 2 (DF).
// Putting both engines behind one mode input is this design's choice.
module fir_lowpower_dsp #(
  parameter int unsigned MULT_W  = fir_lp_pkg::MULT_W_DEF,
  parameter int unsigned N_MAX   = fir_lp_pkg::N_MAX_DEF,
  parameter int unsigned PCV_W   = fir_lp_pkg::PCV_W_DEF,
  parameter int unsigned STAGE_W = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  parameter int unsigned LEN_W   = $clog2(N_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               scheme_sel,
  input  logic               cfg_we,
  input  logic [STAGE_W-1:0] cfg_pos,
  input  logic [STAGE_W-1:0] cfg_stage,
  input  logic [MULT_W-1:0]  cfg_coef,
  input  logic               cfg_start,
  input  logic [LEN_W-1:0]   cfg_taps,
  output logic               ready,
  output logic               mode_df,      // active mode: 1 = DF (Scheme III)
  input  logic               x_valid,
  output logic               x_ready,
  input  logic [MULT_W-1:0]  x_data,
  output logic               y_valid,
  output logic [PCV_W-1:0]   y_data,
  output logic               mac_step,
  output logic               save_step
);

  logic tdf_ready, tdf_x_ready, tdf_y_valid, tdf_mac, tdf_save;
  logic df_ready,  df_x_ready,  df_y_valid,  df_mac;
  logic [PCV_W-1:0] tdf_y, df_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         mode_df <= 1'b0;
    else if (cfg_start) mode_df <= scheme_sel;
  end

  tdf_fir_dsp #(.MULT_W(MULT_W), .N_MAX(N_MAX), .PCV_W(PCV_W)) u_tdf (
    .clk, .rst_n,
    .cfg_we(cfg_we && !scheme_sel), .cfg_pos, .cfg_stage, .cfg_coef,
    .cfg_start(cfg_start && !scheme_sel), .cfg_taps, .ready(tdf_ready),
    .x_valid(x_valid && !mode_df), .x_ready(tdf_x_ready), .x_data,
    .y_valid(tdf_y_valid), .y_data(tdf_y),
    .mac_step(tdf_mac), .save_step(tdf_save));

  df_fir_mac #(.MULT_W(MULT_W), .N_MAX(N_MAX), .PCV_W(PCV_W)) u_df (
    .clk, .rst_n,
    .cfg_we(cfg_we && scheme_sel), .cfg_pos, .cfg_stage, .cfg_coef,
    .cfg_start(cfg_start && scheme_sel), .cfg_taps, .ready(df_ready),
    .x_valid(x_valid && mode_df), .x_ready(df_x_ready), .x_data,
    .y_valid(df_y_valid), .y_data(df_y),
    .mac_step(df_mac));

  assign ready     = mode_df ? df_ready    : tdf_ready;
  assign x_ready   = mode_df ? df_x_ready  : tdf_x_ready;
  assign y_valid   = mode_df ? df_y_valid  : tdf_y_valid;
  assign y_data    = mode_df ? df_y        : tdf_y;
  assign mac_step  = mode_df ? df_mac      : tdf_mac;
  assign save_step = !mode_df && tdf_save;

endmodule
