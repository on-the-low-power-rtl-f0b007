// tb_pcv_adder: checks that the adder adds the sign-extended 32-bit product to
// the 40-bit addend, with corner and random values.
module tb_pcv_adder;
  int checks = 0, failures = 0;
  logic [31:0] prod;
  logic [39:0] addend, sum;

  pcv_adder dut (.prod, .addend, .sum);

  task automatic chk(input logic [31:0] p, input logic [39:0] a);
    longint e;
    prod = p; addend = a; #1;
    e = longint'($signed(a)) + longint'($signed(p));
    checks++;
    if (sum !== 40'(e)) begin
      failures++;
      $display("mismatch %0d + %0d -> %0d", $signed(a), $signed(p), $signed(sum));
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(32'd30, 40'd0);                 // stage 2 of the 4-tap example, n = 0
    chk(32'd135, 40'd156);              // 135 + 156 = 291
    chk(32'hFFFF_FFFF, 40'd0);          // -1
    chk(32'h8000_0000, 40'd5);
    chk(32'h4000_0000, 40'h7F_C000_0000);
    repeat (5000) chk($urandom, {8'($urandom), $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
