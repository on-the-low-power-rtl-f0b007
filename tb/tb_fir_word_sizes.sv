// tb_fir_word_sizes: the evaluation workload on the two other multiplier sizes,
// 8x8 and 24x24 bits (the processor built with MULT_W = 8 and MULT_W = 24),
// 200 samples per run to keep the run short. The 24-bit build widens the
// precalculated values and accumulator to 56 bits (48-bit products, 89 terms). Same checks as the default-size
// bench: every output against a direct convolution, throughput, and the
// transition counts at the multiplier inputs.
module tb_fir_word_sizes;
  logic clk = 0;
  always #5 clk = ~clk;

  // ---- 8-bit instance ----
  logic        rst8, sel8, we8, start8, ready8, mode8, xv8, xr8, yv8, mac8, save8, done8;
  logic [6:0]  pos8, stg8, taps8;
  logic [7:0]  coef8, x8, ma8, mb8;
  logic [39:0] y8;
  int          checks8, failures8;

  fir_lowpower_dsp #(.MULT_W(8)) dut8 (
    .clk, .rst_n(rst8), .scheme_sel(sel8), .cfg_we(we8), .cfg_pos(pos8), .cfg_stage(stg8),
    .cfg_coef(coef8), .cfg_start(start8), .cfg_taps(taps8), .ready(ready8), .mode_df(mode8),
    .x_valid(xv8), .x_ready(xr8), .x_data(x8), .y_valid(yv8), .y_data(y8),
    .mac_step(mac8), .save_step(save8));
  assign ma8 = mode8 ? dut8.u_df.u_mult.a : dut8.u_tdf.u_mult.a;
  assign mb8 = mode8 ? dut8.u_df.u_mult.b : dut8.u_tdf.u_mult.b;
  logic mw8;
  assign mw8 = mode8 ? dut8.u_df.push : dut8.u_tdf.pcvm_we;
  logic [63:0] md8;
  assign md8 = mode8 ? 64'((x8)) : 64'((dut8.u_tdf.bus2_wr));
  fir_workload_runner #(.MW(8), .NSAMP(200)) run8 (
    .clk, .rst_n(rst8), .scheme_sel(sel8), .cfg_we(we8), .cfg_pos(pos8), .cfg_stage(stg8),
    .cfg_coef(coef8), .cfg_start(start8), .cfg_taps(taps8), .ready(ready8), .mode_df(mode8),
    .x_valid(xv8), .x_ready(xr8), .x_data(x8), .y_valid(yv8), .y_data(y8),
    .save_step(save8), .mult_a(ma8), .mult_b(mb8), .mem_we(mw8), .mem_wdata(md8), .done(done8),
    .checks(checks8), .failures(failures8));

  // ---- 24-bit instance ----
  logic        rst24, sel24, we24, start24, ready24, mode24, xv24, xr24, yv24, mac24, save24, done24;
  logic [6:0]  pos24, stg24, taps24;
  logic [23:0] coef24, x24, ma24, mb24;
  logic [55:0] y24;
  int          checks24, failures24;

  fir_lowpower_dsp #(.MULT_W(24), .PCV_W(56)) dut24 (
    .clk, .rst_n(rst24), .scheme_sel(sel24), .cfg_we(we24), .cfg_pos(pos24), .cfg_stage(stg24),
    .cfg_coef(coef24), .cfg_start(start24), .cfg_taps(taps24), .ready(ready24), .mode_df(mode24),
    .x_valid(xv24), .x_ready(xr24), .x_data(x24), .y_valid(yv24), .y_data(y24),
    .mac_step(mac24), .save_step(save24));
  assign ma24 = mode24 ? dut24.u_df.u_mult.a : dut24.u_tdf.u_mult.a;
  assign mb24 = mode24 ? dut24.u_df.u_mult.b : dut24.u_tdf.u_mult.b;
  logic mw24;
  assign mw24 = mode24 ? dut24.u_df.push : dut24.u_tdf.pcvm_we;
  logic [63:0] md24;
  assign md24 = mode24 ? 64'((x24)) : 64'((dut24.u_tdf.bus2_wr));
  fir_workload_runner #(.MW(24), .NSAMP(200), .YW(56)) run24 (
    .clk, .rst_n(rst24), .scheme_sel(sel24), .cfg_we(we24), .cfg_pos(pos24), .cfg_stage(stg24),
    .cfg_coef(coef24), .cfg_start(start24), .cfg_taps(taps24), .ready(ready24), .mode_df(mode24),
    .x_valid(xv24), .x_ready(xr24), .x_data(x24), .y_valid(yv24), .y_data(y24),
    .save_step(save24), .mult_a(ma24), .mult_b(mb24), .mem_we(mw24), .mem_wdata(md24), .done(done24),
    .checks(checks24), .failures(failures24));

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks24, failures8 + failures24 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (done8 && done24);
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks24, failures8 + failures24);
    $finish;
  end
endmodule
