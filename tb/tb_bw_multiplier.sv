// tb_bw_multiplier: checks the Baugh-Wooley array multiplier against the
// simulator's signed product: exhaustively at 8x8 bits and with corner and
// random operands at the default 16x16 and at 24x24 bits.
module tb_bw_multiplier;
  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8;  logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;
  logic [23:0] a24, b24; logic [47:0] p24;

  bw_multiplier #(.W(8))  u8  (.a(a8),  .b(b8),  .p(p8));
  bw_multiplier           u16 (.a(a16), .b(b16), .p(p16));
  bw_multiplier #(.W(24)) u24 (.a(a24), .b(b24), .p(p24));

  task automatic chk16(input logic [15:0] x, input logic [15:0] y);
    longint e;
    a16 = x; b16 = y; #1;
    e = longint'($signed(x)) * longint'($signed(y));
    checks++;
    if (p16 !== 32'(e)) begin
      failures++;
      if (failures < 10) $display("16-bit mismatch %0d * %0d: got %0d", $signed(x), $signed(y), $signed(p16));
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h8001};
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int e;
        a8 = 8'(i); b8 = 8'(j); #1;
        e = int'($signed(a8)) * int'($signed(b8));
        checks++;
        if (p8 !== 16'(e)) begin
          failures++;
          if (failures < 10) $display("8-bit mismatch %0d * %0d", $signed(a8), $signed(b8));
        end
      end
    foreach (corners[i]) foreach (corners[j]) chk16(corners[i], corners[j]);
    repeat (20000) chk16(16'($urandom), 16'($urandom));
    repeat (5000) begin
      longint e;
      a24 = 24'($urandom); b24 = 24'($urandom); #1;
      e = longint'($signed(a24)) * longint'($signed(b24));
      checks++;
      if (p24 !== 48'(e)) failures++;
    end
    a24 = 24'h800000; b24 = 24'h800000; #1; checks++;
    if (p24 !== 48'h400000000000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
