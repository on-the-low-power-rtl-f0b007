// tb_sample_delay_line: pushes samples into the circular buffer at several
// lengths and reads every delay k < len, comparing with a bench history in
// which samples before the last clear are zero.
module tb_sample_delay_line;
  localparam int N = 89;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, clear, push;
  logic [6:0]  len, tap;
  logic [15:0] din, dout;

  sample_delay_line dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [5] = '{4, 1, 89, 54, 17};
    rst_n = 0; clear = 0; push = 0; len = 4; tap = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (lens[li]) begin
      logic [15:0] hist [$];
      len = 7'(lens[li]);
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      hist.delete();
      for (int n = 0; n < 2*lens[li] + 3; n++) begin
        @(negedge clk);
        din = 16'($urandom);
        hist.push_front(din);
        push = 1;
        @(negedge clk) push = 0;
        for (int k = 0; k < lens[li]; k++) begin
          logic [15:0] e;
          tap = 7'(k); #1;
          e = (k < hist.size()) ? hist[k] : 16'd0;
          checks++;
          if (dout !== e) begin
            failures++;
            if (failures < 10) $display("len %0d n %0d tap %0d: %h expected %h", lens[li], n, k, dout, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
