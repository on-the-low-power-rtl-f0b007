// tb_coef_memory: writes coefficient/stage pairs in a scrambled position order,
// then reads every position back and compares with a copy kept by the bench.
module tb_coef_memory;
  localparam int N = 89;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       we;
  logic [6:0] waddr, wstage, raddr, rstage;
  logic [15:0] wcoef, rcoef;
  logic [15:0] ref_c [N];
  logic [6:0]  ref_s [N];

  coef_memory dut (.clk, .we, .waddr, .wcoef, .wstage, .raddr, .rcoef, .rstage);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wcoef = 0; wstage = 0; raddr = 0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < N; i++) begin
        int p;
        p = (i * 37 + r * 11) % N;     // 37 is coprime with 89: a permutation
        ref_c[p] = 16'($urandom);
        ref_s[p] = 7'($urandom_range(N-1));
        @(negedge clk);
        we = 1; waddr = 7'(p); wcoef = ref_c[p]; wstage = ref_s[p];
      end
      @(negedge clk) we = 0;
      for (int i = 0; i < N; i++) begin
        raddr = 7'(i); #1;
        checks++;
        if (rcoef !== ref_c[i] || rstage !== ref_s[i]) begin
          failures++;
          $display("position %0d: got %h/%0d expected %h/%0d", i, rcoef, rstage, ref_c[i], ref_s[i]);
        end
      end
    end
    // a write with we low changes nothing
    @(negedge clk); waddr = 0; wcoef = ~ref_c[0]; wstage = 0; we = 0;
    @(negedge clk); raddr = 0; #1; checks++;
    if (rcoef !== ref_c[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
