// sd_block_fifo: internal byte buffer with block commit and rewind.
//
// Acquired data is collected in an on-chip array of registers before it is
// written to the card, because on-chip storage is much faster to reach than
// external memory. The buffer is a circular FIFO with two read pointers:
//   rd_ptr  - where the block writer is reading now (first-word-fall-through:
//             rd_data is the byte at rd_ptr, rd_en moves past it);
//   cm_ptr  - the start of the oldest byte the card has not yet accepted.
// Space is freed only by commit (cm_ptr <= rd_ptr), issued when the card
// reports a good CRC status. rewind (rd_ptr <= cm_ptr) rolls back a block the
// card rejected, so the same bytes can be sent again.
//
// Interface: wr_en/wr_data with full (no write is taken while full);
// rd_en/rd_data with avail (bytes readable from rd_ptr); level (bytes held,
// including bytes read but not yet committed). All one clock, no latency on
// the read side. DEPTH must be a power of two.
// The buffer and its resend role follow the design description; its depth
// (two blocks, so one block can be filled while the other is written) and the
// commit/rewind mechanism are this design's choice.
module sd_block_fifo #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [7:0]               wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [7:0]               rd_data,
  output logic [$clog2(DEPTH):0]   avail,
  output logic [$clog2(DEPTH):0]   level,
  input  logic                     commit,
  input  logic                     rewind
);
  localparam int AW = $clog2(DEPTH);

  logic [7:0]  mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr, cm_ptr;

  assign level   = wr_ptr - cm_ptr;
  assign avail   = wr_ptr - rd_ptr;
  assign full    = (level == (AW+1)'(DEPTH));
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cm_ptr <= '0;
    end else begin
      if (wr_en && !full) wr_ptr <= wr_ptr + 1'b1;
      if (rewind)                    rd_ptr <= cm_ptr;
      else if (rd_en && avail != 0)  rd_ptr <= rd_ptr + 1'b1;
      if (commit) cm_ptr <= rd_ptr;
    end
  end

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");

  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> avail != 0)
    else $error("read from an empty buffer");
endmodule
