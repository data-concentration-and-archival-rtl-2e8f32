// sram_model: behavioural model of a 16-bit wide synchronous SRAM.
//
// Not synthesizable; used by testbenches. Word i holds 16'(i*3 + 16'h1357)
// so a reader can be checked without loading a file. Reads are synchronous:
// the word at the address present on a clock edge with ce_n and oe_n low
// appears on dq after that edge. Writes are not modelled.
module sram_model #(
  parameter int ADDR_W = 18
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              ce_n,
  input  logic              oe_n,
  output logic [15:0]       dq,
  output int                reads
);
  function automatic logic [15:0] word_at(input logic [ADDR_W-1:0] a);
    return 16'(32'(a) * 3 + 32'h1357);
  endfunction

  initial begin
    dq    = '0;
    reads = 0;
  end

  always @(posedge clk) begin
    if (!ce_n && !oe_n) begin
      dq <= word_at(addr);
      reads <= reads + 1;
    end
  end
endmodule
