// tb_fir_lowpower_dsp: runs the whole processor, at its default sizes (16x16
// multiplier, 89 taps, 40-bit values), through the example and the five-filter
// evaluation workload with 1000 samples per run, in all three schemes, using
// fir_workload_runner for stimulus, checking and activity counting.
module tb_fir_lowpower_dsp;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, scheme_sel, cfg_we, cfg_start, ready, mode_df;
  logic        x_valid, x_ready, y_valid, mac_step, save_step, done;
  logic [6:0]  cfg_pos, cfg_stage, cfg_taps;
  logic [15:0] cfg_coef, x_data, mult_a, mult_b;
  logic        mem_we;
  logic [63:0] mem_wdata;
  logic [39:0] y_data;
  int          checks, failures;

  fir_lowpower_dsp dut (.*);

  assign mult_a = mode_df ? dut.u_df.u_mult.a : dut.u_tdf.u_mult.a;
  assign mult_b = mode_df ? dut.u_df.u_mult.b : dut.u_tdf.u_mult.b;
  assign mem_we = mode_df ? dut.u_df.push : dut.u_tdf.pcvm_we;
  assign mem_wdata = mode_df ? 64'((x_data)) : 64'((dut.u_tdf.bus2_wr));

  fir_workload_runner #(.MW(16), .NSAMP(1000)) run (.*);

  initial begin
    repeat (6_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
