// fir_workload_runner: bench-side driver and checker for fir_lowpower_dsp.
//
// Runs the evaluation workload through one processor instance:
//  * the 4-tap example (h = 60, 22, 15, 78; x = 2, 9, 6, 5) in TDF order
//    h(2), h(3), h(1), h(0) and in DF order h(2), h(1), h(0), h(3);
//  * five linear-phase filters (three low-pass, two band-pass; windowed sinc
//    designs, lengths 54 to 89, quantised to MW-bit two's complement) each
//    run with NSAMP uniformly distributed random samples in the four
//    structure/ordering combinations DF/norm, DF/min, TDF/norm, TDF/min.
//    "norm" is stage order; "min" is a greedy nearest-neighbour order that
//    keeps the Hamming distance between successive coefficients small (a
//    simple stand-in for an off-line search such as a genetic algorithm).
// Every output is compared with a direct convolution. Bit transitions at the
// multiplier's data and coefficient inputs (mult_a, mult_b of the active
// engine) are counted per sample and checked: TDF changes the data input at
// most once per sample, far less than DF; "min" lowers the coefficient-input
// transitions; TDF/norm and DF/norm see the same coefficient sequence.
// The switching of the AND-gate array of the multiplier (bits a[i]&b[j]) is
// counted as a gate-level proxy: DF/norm must be highest and TDF/min lowest; memory writes
// per sample show the overhead of the PCV memory and of the save transfers.
// The bit changes between successive words written to that memory are
// counted and printed too.
// Also counted and required: save transfers, scheme switches, input stalls.
module fir_workload_runner #(
  parameter int MW    = 16,
  parameter int NSAMP = 1000,
  parameter int YW    = 40
) (
  input  logic          clk,
  output logic          rst_n,
  output logic          scheme_sel,
  output logic          cfg_we,
  output logic [6:0]    cfg_pos,
  output logic [6:0]    cfg_stage,
  output logic [MW-1:0] cfg_coef,
  output logic          cfg_start,
  output logic [6:0]    cfg_taps,
  input  logic          ready,
  input  logic          mode_df,
  output logic          x_valid,
  input  logic          x_ready,
  output logic [MW-1:0] x_data,
  input  logic          y_valid,
  input  logic [YW-1:0] y_data,
  input  logic          save_step,
  input  logic [MW-1:0] mult_a,
  input  logic [MW-1:0] mult_b,
  input  logic          mem_we,
  input  logic [63:0]   mem_wdata,
  output logic          done,
  output int            checks,
  output int            failures
);
  localparam int  N  = 89;
  localparam real PI = 3.14159265358979;

  int      order [N];
  longint  h [N];
  int      n_saves = 0, n_switch = 0, n_stall = 0, n_scheme1 = 0;
  longint  tog_a = 0, tog_b = 0, tog_pp = 0, n_memw = 0, tog_mem = 0;
  logic [63:0] wd_q = '0;
  logic [MW-1:0] a_q, b_q;
  logic    mode_q;
  string   names [4] = '{"DF/norm ", "DF/min  ", "TDF/norm", "TDF/min "};

  always @(posedge clk) begin
    if (save_step) n_saves++;
    if (x_valid && !x_ready) n_stall++;
    if (rst_n && mode_df != mode_q) n_switch++;
    mode_q <= mode_df;
    tog_a += $countones(mult_a ^ a_q);
    for (int j = 0; j < MW; j++)
      tog_pp += $countones((mult_a & {MW{mult_b[j]}}) ^ (a_q & {MW{b_q[j]}}));
    if (mem_we) begin
      n_memw++;
      tog_mem += $countones(mem_wdata ^ wd_q);
      wd_q <= mem_wdata;
    end
    tog_b += $countones(mult_b ^ b_q);
    a_q <= mult_a;
    b_q <= mult_b;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 25) $display("FAIL: %s", msg);
  endtask

  // Load the coefficients of the current order into the engine selected by df.
  task automatic load(input bit df, input int len);
    scheme_sel = df;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_pos = 7'(i); cfg_stage = 7'(order[i]); cfg_coef = MW'(h[order[i]]);
    end
    @(negedge clk);
    cfg_we = 0; cfg_start = 1; cfg_taps = 7'(len);
    @(negedge clk);
    cfg_start = 0;
    while (!ready) @(negedge clk);
  endtask

  // Stream nsamp samples (x_valid held until accepted) and check every output.
  task automatic stream(input int len, input int nsamp, input logic [MW-1:0] xs [$],
                        input bit example, input longint ys [$], input int period);
    longint xh [$];
    int sent, got, cyc_start, cyc;
    sent = 0; got = 0; cyc = 0; cyc_start = -1;
    fork
      begin : driver
        while (sent < nsamp) begin
          @(negedge clk);
          x_valid = 1; x_data = xs[sent];
          @(posedge clk);
          while (!x_ready) @(posedge clk);
          xh.push_front(longint'($signed(xs[sent])));
          sent++;
          @(negedge clk);
          x_valid = 0;
        end
      end
      begin : monitor
        while (got < nsamp) begin
          @(posedge clk);
          cyc++;
          if (y_valid) begin
            longint yref;
            yref = 0;
            if (example) yref = ys[got];
            else for (int k = 0; k < len && k < xh.size(); k++)
              yref += h[k] * xh[xh.size() - 1 - got + k];
            checks++;
            if (longint'($signed(y_data)) != yref)
              fail($sformatf("len %0d sample %0d: y=%0d expected %0d", len, got, $signed(y_data), yref));
            if (got == 1) cyc_start = cyc;
            got++;
          end
        end
      end
    join
    // steady-state throughput: one output every period cycles
    if (nsamp > 2) begin
      checks++;
      if (cyc - cyc_start != (nsamp - 2) * period)
        fail($sformatf("len %0d: %0d cycles for %0d samples, expected %0d per sample",
                       len, cyc - cyc_start, nsamp - 2, period));
    end
  endtask

  function automatic int ham(input longint a, input longint b);
    return $countones(MW'(a) ^ MW'(b));
  endfunction

  // Greedy nearest-neighbour order over stages 0..len-1, best starting stage.
  task automatic min_order(input int len);
    int best = -1;
    int ord [N];
    for (int s0 = 0; s0 < len; s0++) begin
      bit used [N];
      int cost, cur;
      used = '{default: 0};
      ord[0] = s0; used[s0] = 1; cur = s0; cost = 0;
      for (int i = 1; i < len; i++) begin
        int bk = -1, bd = 1000;
        for (int k = 0; k < len; k++)
          if (!used[k] && ham(h[cur], h[k]) < bd) begin bd = ham(h[cur], h[k]); bk = k; end
        ord[i] = bk; used[bk] = 1; cur = bk; cost += bd;
      end
      cost += ham(h[cur], h[s0]);
      if (best < 0 || cost < best) begin
        best = cost;
        for (int i = 0; i < len; i++) order[i] = ord[i];
      end
    end
  endtask

  task automatic design_filter(input int f, output int len);
    real w1, w2, c [N], mx;
    bit bp;
    case (f)
      0: begin len = 54; bp = 0; w1 = 0.0;      w2 = 0.25 * PI; end
      1: begin len = 71; bp = 0; w1 = 0.0;      w2 = 0.35 * PI; end
      2: begin len = 89; bp = 0; w1 = 0.0;      w2 = 0.15 * PI; end
      3: begin len = 62; bp = 1; w1 = 0.2 * PI; w2 = 0.4 * PI;  end
      default: begin len = 80; bp = 1; w1 = 0.45 * PI; w2 = 0.6 * PI; end
    endcase
    mx = 0.0;
    for (int k = 0; k < len; k++) begin
      real t, v, win;
      t = k - (len - 1) / 2.0;
      win = 0.54 - 0.46 * $cos(2.0 * PI * k / (len - 1));
      if (t == 0.0) v = (w2 - w1) / PI;
      else          v = ($sin(w2 * t) - $sin(w1 * t)) / (PI * t);
      c[k] = v * win;
      if (c[k] > mx) mx = c[k];
      if (-c[k] > mx) mx = -c[k];
    end
    for (int k = 0; k < len; k++) begin
      real q;
      q = c[k] / mx * ((2.0 ** (MW - 1)) - 1.0);
      h[k] = longint'($rtoi(q >= 0.0 ? q + 0.5 : q - 0.5));
    end
  endtask

  initial begin
    logic [MW-1:0] xs [$];
    longint ys [$];
    checks = 0; failures = 0; done = 0;
    rst_n = 0; scheme_sel = 0; cfg_we = 0; cfg_pos = 0; cfg_stage = 0; cfg_coef = 0;
    cfg_start = 0; cfg_taps = 0; x_valid = 0; x_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- the 4-tap example in both structures ----
    h[0] = 60; h[1] = 22; h[2] = 15; h[3] = 78;
    xs = '{MW'(2), MW'(9), MW'(6), MW'(5)};
    ys = '{120, 584, 588, 723};
    order[0] = 2; order[1] = 3; order[2] = 1; order[3] = 0;
    load(0, 4);
    stream(4, 4, xs, 1, ys, 8);
    order[0] = 2; order[1] = 1; order[2] = 0; order[3] = 3;
    load(1, 4);
    stream(4, 4, xs, 1, ys, 6);

    // ---- five filters, four structure/ordering combinations ----
    $display("MW=%0d  filter  len  combo      data-in  coef-in  pp-array  mem-wr  mem-bits  (per sample)", MW);
    for (int f = 0; f < 5; f++) begin
      int len, s, pos [N];
      real ta [4], tb [4], tp [4], tm [4], km [4];
      design_filter(f, len);
      xs.delete();
      for (int i = 0; i < NSAMP; i++) xs.push_back(MW'($urandom));
      for (int combo = 0; combo < 4; combo++) begin
        longint a0, b0, p0, m0, w0;
        bit df;
        df = (combo < 2);
        if (combo % 2 == 0) for (int i = 0; i < len; i++) order[i] = i;
        else min_order(len);
        s = 0;
        for (int i = 0; i < len; i++) pos[order[i]] = i;
        for (int k = 1; k < len; k++) if (pos[k-1] > pos[k]) s++;
        if (!df && combo == 2) begin
          checks++;
          if (s != 0) fail("stage order needs save transfers");
          n_scheme1++;
        end
        load(df, len);
        a0 = tog_a; b0 = tog_b; p0 = tog_pp; m0 = n_memw; w0 = tog_mem;
        stream(len, NSAMP, xs, 0, ys, df ? len + 2 : len + s + 2);
        ta[combo] = real'(tog_a - a0) / NSAMP;
        tb[combo] = real'(tog_b - b0) / NSAMP;
        tp[combo] = real'(tog_pp - p0) / NSAMP;
        tm[combo] = real'(n_memw - m0) / NSAMP;
        km[combo] = real'(tog_mem - w0) / NSAMP;
        $display("MW=%0d   %0d      %0d   %s  %7.1f  %7.1f  %8.1f  %5.1f  %7.1f", MW, f, len,
                 names[combo], ta[combo], tb[combo], tp[combo], tm[combo], km[combo]);
      end
      checks++;
      if (ta[2] > MW + 1 || ta[3] > MW + 1) fail("TDF data input switches more than once per sample");
      checks++;
      if (ta[2] * 10.0 > ta[0]) fail("TDF data-input activity not below a tenth of DF");
      checks++;
      if (tb[1] >= tb[0] || tb[3] >= tb[2]) fail("ordering did not reduce coefficient-input activity");
      // partial-product array activity: each lever lowers it, both together most
      checks++;
      if (!(tp[0] > tp[1] && tp[0] > tp[2] && tp[1] > tp[3] && tp[2] > tp[3]))
        fail("partial-product activity: DF/norm not highest or TDF/min not lowest");
      // memory overhead: DF writes one sample, TDF one PCV per stage plus one per save
      checks++;
      if (tm[0] != 1.0 || tm[1] != 1.0 || tm[2] != real'(len) || tm[3] <= tm[2])
        fail($sformatf("memory writes per sample %0.1f %0.1f %0.1f %0.1f", tm[0], tm[1], tm[2], tm[3]));
      checks++;
      if (tb[0] > tb[2] + 1.0 || tb[2] > tb[0] + 1.0) fail("DF/norm and TDF/norm coefficient activity differ");
    end

    // ---- every mechanism must have happened ----
    $display("MW=%0d: save transfers %0d, scheme switches %0d, input stall cycles %0d, Scheme I runs %0d",
             MW, n_saves, n_switch, n_stall, n_scheme1);
    checks++; if (n_saves == 0)   fail("no save transfer happened");
    checks++; if (n_switch == 0)  fail("no scheme switch happened");
    checks++; if (n_stall == 0)   fail("no input stall happened");
    checks++; if (n_scheme1 == 0) fail("Scheme I never ran");
    done = 1;
  end
endmodule
