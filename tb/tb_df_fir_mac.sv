// tb_df_fir_mac: end-to-end check of the direct-form MAC engine (Scheme III)
// at its default sizes.
// 1) The 4-tap example h = 60, 22, 15, 78, x = 2, 9, 6, 5 with execution order
//    h(2), h(1), h(0), h(3): y = 120, 584, 588, 723, and the multiplier sees
//    the operand pairs in that order (coefficient 15, 22, 60, 78).
// 2) Random filters and orders up to 89 taps against a direct convolution, in
//    L + 2 cycles per sample.
module tb_df_fir_mac;
  localparam int N = 89;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, cfg_we, cfg_start, ready, x_valid, x_ready, y_valid, mac_step;
  logic [6:0]  cfg_pos, cfg_stage, cfg_taps;
  logic [15:0] cfg_coef, x_data;
  logic [39:0] y_data;

  df_fir_mac dut (.*);

  int     order [N];
  longint h [N];
  longint coef_seen [$];

  always @(posedge clk) if (mac_step) coef_seen.push_back(longint'($signed(dut.u_mult.b)));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_pos = 7'(i); cfg_stage = 7'(order[i]); cfg_coef = 16'(h[order[i]]);
    end
    @(negedge clk);
    cfg_we = 0; cfg_start = 1; cfg_taps = 7'(len);
    @(negedge clk);
    cfg_start = 0;
    while (!ready) @(negedge clk);
  endtask

  task automatic run_sample(input logic [15:0] x, output longint y, output int cyc);
    x_valid = 1; x_data = x;
    @(negedge clk);
    x_valid = 0;
    cyc = 1;
    while (!y_valid && cyc < 1000) begin @(negedge clk); cyc++; end
    y = longint'($signed(y_data));
  endtask

  initial begin
    longint y;
    int cyc;
    int xs [4]  = '{2, 9, 6, 5};
    longint ys [4] = '{120, 584, 588, 723};
    rst_n = 0; cfg_we = 0; cfg_start = 0; cfg_taps = 0; cfg_pos = 0; cfg_stage = 0;
    cfg_coef = 0; x_valid = 0; x_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    order[0] = 2; order[1] = 1; order[2] = 0; order[3] = 3;
    h[0] = 60; h[1] = 22; h[2] = 15; h[3] = 78;
    load(4);
    for (int n = 0; n < 4; n++) begin
      coef_seen.delete();
      run_sample(16'(xs[n]), y, cyc);
      checks++;
      if (y != ys[n] || cyc != 4 + 2) begin
        failures++;
        $display("example n=%0d: y=%0d expected %0d, %0d cycles expected 6", n, y, ys[n], cyc);
      end
      checks++;
      if (coef_seen.size() != 4 || coef_seen[0] != 15 || coef_seen[1] != 22 ||
          coef_seen[2] != 60 || coef_seen[3] != 78) begin
        failures++;
        $display("coefficient sequence %p", coef_seen);
      end
      @(negedge clk);
    end
    for (int trial = 0; trial < 9; trial++) begin
      int len;
      longint xh [$];
      len = (trial < 3) ? N : $urandom_range(N, 1);
      for (int i = 0; i < N; i++) order[i] = i;
      if (trial % 3 == 1) for (int i = 0; i < len; i++) order[i] = len - 1 - i;
      if (trial % 3 == 2) begin
        int j;
        int tmp [N];
        order.shuffle();
        j = 0;
        foreach (order[i]) if (order[i] < len) begin tmp[j] = order[i]; j++; end
        for (int i = 0; i < len; i++) order[i] = tmp[i];
      end
      for (int k = 0; k < len; k++) h[k] = longint'($signed(16'($urandom)));
      if (trial == 0) for (int k = 0; k < len; k++) h[k] = -32768;
      load(len);
      xh.delete();
      for (int n = 0; n < 2*len + 5; n++) begin
        longint yref;
        logic [15:0] xv;
        xv = (trial == 0) ? 16'h8000 : 16'($urandom);
        xh.push_front(longint'($signed(xv)));
        run_sample(xv, y, cyc);
        yref = 0;
        for (int k = 0; k < len && k < xh.size(); k++) yref += h[k] * xh[k];
        checks++;
        if (y != yref || cyc != len + 2) begin
          failures++;
          if (failures < 20)
            $display("trial %0d len %0d n %0d: y=%0d ref=%0d cycles %0d expected %0d",
                     trial, len, n, y, yref, cyc, len + 2);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
