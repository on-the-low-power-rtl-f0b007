// tb_tdf_fir_dsp: end-to-end check of the TDF engine (Schemes I and II) at its
// default sizes (16x16 multiplier, up to 89 taps, 40-bit PCVs).
// 1) The 4-tap example h = 60, 22, 15, 78, x = 2, 9, 6, 5, order h(2), h(3),
//    h(1), h(0): y = 120, 584, 588, 723, and after every sample the PCVM holds
//    the published PCV tables (PCV5, PCV4/PCV3, PCV2/PCV1, PCV0).
// 2) Random filters (natural order = Scheme I, reversed, random order = Scheme
//    II) up to 89 taps against a direct convolution; L + S + 2 cycles per sample.
// 3) The multiplier data input changes at most once per sample.
module tb_tdf_fir_dsp;
  localparam int N = 89;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, cfg_we, cfg_start, ready, x_valid, x_ready, y_valid, mac_step, save_step;
  logic [6:0]  cfg_pos, cfg_stage, cfg_taps;
  logic [15:0] cfg_coef, x_data;
  logic [39:0] y_data;

  tdf_fir_dsp dut (.*);

  int     order [N];
  longint h [N];
  int     saves_seen = 0, data_toggles = 0;
  logic [15:0] a_prev;

  always @(posedge clk) begin
    if (save_step) saves_seen++;
    if (dut.u_mult.a != a_prev) data_toggles++;
    a_prev <= dut.u_mult.a;
  end

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

  // Send one sample, wait for y; return the result and the cycles from accept to y_valid.
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
    // published PCV tables: rows n = 0..3, columns PCVM0..PCVM6
    longint pcv [4][7] = '{'{120, 0, 44, 0, 30, 156, 0},
                            '{584, 44, 228, 30, 291, 702, 0},
                            '{588, 228, 423, 291, 792, 468, 0},
                            '{723, 423, 902, 792, 543, 390, 0}};
    rst_n = 0; cfg_we = 0; cfg_start = 0; cfg_taps = 0; cfg_pos = 0; cfg_stage = 0;
    cfg_coef = 0; x_valid = 0; x_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- 1: published example ----
    order[0] = 2; order[1] = 3; order[2] = 1; order[3] = 0;
    h[0] = 60; h[1] = 22; h[2] = 15; h[3] = 78;
    load(4);
    saves_seen = 0;
    for (int n = 0; n < 4; n++) begin
      run_sample(16'(xs[n]), y, cyc);
      checks++;
      if (y != ys[n] || cyc != 4 + 2 + 2) begin
        failures++;
        $display("example n=%0d: y=%0d expected %0d, %0d cycles expected 8", n, y, ys[n], cyc);
      end
      for (int a = 0; a < 7; a++) begin
        checks++;
        if (longint'($signed(dut.u_pcvm.mem[a])) != pcv[n][a]) begin
          failures++;
          $display("example n=%0d PCVM%0d=%0d expected %0d", n, a, $signed(dut.u_pcvm.mem[a]), pcv[n][a]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (saves_seen != 8) begin failures++; $display("save transfers %0d, expected 8", saves_seen); end
    // ---- 2/3: random filters ----
    for (int trial = 0; trial < 9; trial++) begin
      int len, s, pos [N];
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
      for (int i = 0; i < len; i++) pos[order[i]] = i;
      s = 0;
      for (int k = 1; k < len; k++) if (pos[k-1] > pos[k]) s++;
      for (int k = 0; k < len; k++) h[k] = longint'($signed(16'($urandom)));
      if (trial == 0) for (int k = 0; k < len; k++) h[k] = -32768;   // full-scale worst case
      load(len);
      xh.delete();
      for (int n = 0; n < 2*len + 5; n++) begin
        longint yref;
        int t0;
        logic [15:0] xv;
        xv = (trial == 0) ? 16'h8000 : 16'($urandom);
        xh.push_front(longint'($signed(xv)));
        t0 = data_toggles;
        run_sample(xv, y, cyc);
        yref = 0;
        for (int k = 0; k < len && k < xh.size(); k++) yref += h[k] * xh[k];
        checks++;
        if (y != yref || cyc != len + s + 2) begin
          failures++;
          if (failures < 20)
            $display("trial %0d len %0d n %0d: y=%0d ref=%0d cycles %0d expected %0d",
                     trial, len, n, y, yref, cyc, len + s + 2);
        end
        checks++;
        if (data_toggles - t0 > 1) begin failures++; $display("data input changed %0d times in a sample", data_toggles - t0); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
