// sample_delay_line: data memory of the direct-form filter, the z^-1 chain.
//
// A circular buffer of the last len samples. push writes x(n) at the head;
// dout = x(n-tap) is read combinationally, the newest sample at tap 0.
// clear zeroes the whole buffer in one cycle and resets the head, so the
// samples before the first one read as zero. Taps at or beyond len are not
// meaningful. The circular addressing is this design's choice.
module sample_delay_line #(
  parameter int unsigned W       = fir_lp_pkg::MULT_W_DEF,
  parameter int unsigned N_MAX   = fir_lp_pkg::N_MAX_DEF,
  parameter int unsigned STAGE_W = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  parameter int unsigned LEN_W   = $clog2(N_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [LEN_W-1:0]   len,
  input  logic               push,
  input  logic [W-1:0]       din,
  input  logic [STAGE_W-1:0] tap,
  output logic [W-1:0]       dout
);

  logic [W-1:0]       mem [N_MAX];
  logic [STAGE_W-1:0] head;         // location of the newest sample
  logic [STAGE_W-1:0] head_next;
  logic [STAGE_W:0]   rd_addr;

  always_comb begin
    if (32'(head) + 1 >= 32'(len)) head_next = '0;
    else                           head_next = head + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
    end else if (clear) begin
      head <= '0;
    end else if (push) begin
      head <= head_next;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_MAX; i++) begin
      if (clear) mem[i] <= '0;
      else if (push && head_next == STAGE_W'(i)) mem[i] <= din;
    end
  end

  // x(n-tap) sits tap places behind the head, modulo len.
  always_comb begin
    if (tap <= head) rd_addr = (STAGE_W+1)'(head) - (STAGE_W+1)'(tap);
    else             rd_addr = (STAGE_W+1)'(head) + (STAGE_W+1)'(len) - (STAGE_W+1)'(tap);
    dout = (32'(rd_addr) < N_MAX) ? mem[rd_addr[STAGE_W-1:0]] : '0;
  end

endmodule
