// tb_tdf_control: checks the TDF sequencer on its own.
// 1) The 4-tap example with execution order h(2), h(3), h(1), h(0): after the
//    set-up passes and clearing of locations 0..7, every sample must issue
//      copy 4->3, add 5->4, add 6->5, copy 2->1, add 3->2, add 1->0, output 0,
//    i.e. the seven-location layout PCVM0..PCVM6 of the published example, in
//    L + S + 2 = 4 + 2 + 2 = 8 cycles per sample.
// 2) Random lengths and orders: the bench models the memories and the
//    arithmetic from the controller's addresses and compares y(n) with a direct
//    convolution, and the cycle count with L + S + 2, S counted independently.
module tb_tdf_control;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic             rst_n, cfg_start, x_valid, x_ready, x_load, ready;
  logic [4:0]       cfg_taps;
  logic [3:0]       cmem_raddr, cmem_rstage;
  logic [4:0]       pcvm_raddr, pcvm_waddr;
  logic             pcvm_we, y_load, mac_step, save_step;
  fir_lp_pkg::pcvm_wsel_e pcvm_wsel;

  int               order [N];      // stage at each execution position
  longint           h [N];
  longint           mem [2*N];
  longint           xcur;

  assign cmem_rstage = 4'(order[cmem_raddr]);

  tdf_control #(.N_MAX(N)) dut (.*);

  // bench model of the PCVM and the multiply-add datapath
  always @(posedge clk) begin
    if (pcvm_we) begin
      case (pcvm_wsel)
        fir_lp_pkg::WSEL_SUM:  mem[pcvm_waddr] <= mem[pcvm_raddr] + h[cmem_rstage] * xcur;
        fir_lp_pkg::WSEL_COPY: mem[pcvm_waddr] <= mem[pcvm_raddr];
        default:               mem[pcvm_waddr] <= 0;
      endcase
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic configure(input int len);
    int cyc;
    @(negedge clk);
    cfg_start = 1; cfg_taps = 5'(len);
    @(negedge clk);
    cfg_start = 0;
    cyc = 0;
    while (!ready && cyc < 200) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 4*len) begin
      failures++;
      $display("set-up took %0d cycles, expected %0d", cyc, 4*len);
    end
  endtask

  typedef struct {logic save; int r; int w;} op_t;

  initial begin
    op_t ex [6];
    int  xs [4] = '{2, 9, 6, 5};
    ex[0] = '{1, 4, 3}; ex[1] = '{0, 5, 4}; ex[2] = '{0, 6, 5};
    ex[3] = '{1, 2, 1}; ex[4] = '{0, 3, 2}; ex[5] = '{0, 1, 0};
    rst_n = 0; cfg_start = 0; cfg_taps = 0; x_valid = 0; xcur = 0;
    foreach (mem[i]) mem[i] = 0;
    order = '{default: 0};
    order[0] = 2; order[1] = 3; order[2] = 1; order[3] = 0;
    h[0] = 60; h[1] = 22; h[2] = 15; h[3] = 78;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- part 1: published 4-tap example ----
    foreach (mem[i]) mem[i] = 1234;          // clearing must zero 0..7
    configure(4);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (mem[i] != 0) begin failures++; $display("location %0d not cleared", i); end
    end
    for (int n = 0; n < 4; n++) begin
      int k;
      x_valid = 1; xcur = xs[n];
      #1; checks++;
      if (!(x_ready && x_load)) failures++;
      @(negedge clk);
      x_valid = 0;
      for (k = 0; k < 6; k++) begin
        checks++;
        if (save_step !== ex[k].save || mac_step === ex[k].save || !pcvm_we ||
            pcvm_raddr !== 5'(ex[k].r) || pcvm_waddr !== 5'(ex[k].w)) begin
          failures++;
          $display("sample %0d op %0d: save=%b r=%0d w=%0d, expected save=%b r=%0d w=%0d",
                   n, k, save_step, pcvm_raddr, pcvm_waddr, ex[k].save, ex[k].r, ex[k].w);
        end
        @(negedge clk);
      end
      checks++;
      if (!y_load || pcvm_raddr !== 0) begin failures++; $display("no output cycle"); end
      @(negedge clk);
      checks++;
      if (!ready) failures++;
    end
    // PCV values at n = 3 of the example
    checks++;
    if (mem[0] != 723 || mem[1] != 423 || mem[2] != 902 || mem[3] != 792 ||
        mem[4] != 543 || mem[5] != 390 || mem[6] != 0) begin
      failures++;
      $display("PCVM after n=3: %0d %0d %0d %0d %0d %0d %0d", mem[0], mem[1], mem[2], mem[3], mem[4], mem[5], mem[6]);
    end
    // ---- part 2: random lengths and orders ----
    for (int trial = 0; trial < 40; trial++) begin
      int len, s, pos [N];
      longint xh [$];
      len = (trial == 0) ? 1 : (trial == 1) ? N : $urandom_range(N, 1);
      for (int i = 0; i < N; i++) order[i] = i;
      if (trial % 3 == 1) for (int i = 0; i < len; i++) order[i] = len - 1 - i;   // every stage saves
      else if (trial % 3 == 2) order.shuffle();
      if (trial % 3 == 2) begin
        int j;      // keep only stages < len, in shuffled order
        int tmp [N];
        j = 0;
        foreach (order[i]) if (order[i] < len) begin tmp[j] = order[i]; j++; end
        for (int i = 0; i < len; i++) order[i] = tmp[i];
      end
      for (int i = 0; i < len; i++) pos[order[i]] = i;
      s = 0;
      for (int k = 1; k < len; k++) if (pos[k-1] > pos[k]) s++;
      for (int k = 0; k < len; k++) h[k] = longint'($signed(16'($urandom)));
      foreach (mem[i]) mem[i] = 77;
      configure(len);
      xh.delete();
      for (int n = 0; n < 12; n++) begin
        int cyc;
        longint yref;
        xcur = longint'($signed(16'($urandom)));
        xh.push_front(xcur);
        x_valid = 1;
        @(negedge clk);
        x_valid = 0;
        cyc = 1;
        while (!y_load && cyc < 100) begin @(negedge clk); cyc++; end
        yref = 0;
        for (int k = 0; k < len && k < xh.size(); k++) yref += h[k] * xh[k];
        checks++;
        if (mem[0] != yref || cyc + 1 != len + s + 2) begin
          failures++;
          $display("trial %0d len %0d n %0d: y=%0d ref=%0d cycles=%0d expected %0d",
                   trial, len, n, mem[0], yref, cyc + 1, len + s + 2);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
