// tb_pcvm: fills the precalculated value memory, checks read-back at every
// location, and checks that a read and a write in the same cycle at different
// locations (the save transfer) read the old value and store it.
module tb_pcvm;
  localparam int D = 178;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we;
  logic [7:0]  waddr, raddr;
  logic [39:0] wdata, rdata;
  logic [39:0] model [D];

  pcvm dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      model[i] = {8'($urandom), $urandom};
      we = 1; waddr = 8'(i); wdata = model[i];
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < D; i++) begin
      raddr = 8'(i); #1; checks++;
      if (rdata !== model[i]) begin failures++; $display("loc %0d wrong", i); end
    end
    // copy location k to k-1 while reading k, as a save transfer does
    for (int k = D-1; k > 0; k -= 7) begin
      @(negedge clk);
      raddr = 8'(k); we = 1; waddr = 8'(k-1); #1;
      wdata = rdata;
      checks++;
      if (rdata !== model[k]) failures++;
      model[k-1] = model[k];
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < D; i++) begin
      raddr = 8'(i); #1; checks++;
      if (rdata !== model[i]) begin failures++; $display("loc %0d wrong after copies", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
