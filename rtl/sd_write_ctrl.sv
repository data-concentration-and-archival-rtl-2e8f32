// sd_write_ctrl: single- and multiple-block write to the SD card.
//
// Archives nblk blocks from the internal buffer, starting at card block
// addr, in one of two modes:
//   single (multi=0): each block is a CMD24 followed by its data block;
//   multiple (multi=1): one CMD25, then the data blocks back to back, and a
//     CMD12 (stop transmission) after the last one; this saves a command and
//     its response per block.
// A block is sent only once the buffer holds a whole block. When the card's
// CRC status is not 010 the buffer is rewound to the start of the block and
// the same data is sent again: in single mode behind a fresh CMD24, in
// multiple mode after a CMD12 and a new CMD25 at the failed block's address.
// A good status commits the block, freeing its space in the buffer. After
// MAX_RETRY failures on one block, or a command without a valid response, the
// write ends with err. After CMD12 the controller waits while the card holds
// DAT0 low (busy).
//
// Interface: start (one cycle, while idle) with multi, addr, nblk; done
// pulses at the end, err tells whether it failed. The controller drives the
// command engine and sd_dat_tx and controls the buffer through commit and
// rewind. Counters: blocks written and blocks resent since reset.
// Standard-capacity cards take byte addresses: with BYTE_ADDR set the
// command argument is addr*512.
// The two modes, the CMD24/CMD25/CMD12 commands and the resend on a bad CRC
// status follow the design description; the resend procedure in multiple
// mode, the retry limit and the R1 checks are this design's choice.
module sd_write_ctrl
  import sd_pkg::*;
#(
  parameter int unsigned BLOCK_LEN = BLOCK_BYTES,
  parameter int unsigned FIFO_AW   = 10,
  parameter int unsigned MAX_RETRY = 3,
  parameter bit          BYTE_ADDR = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rise_stb,
  // operation
  input  logic             start,
  input  logic             multi,
  input  logic [31:0]      addr,
  input  logic [15:0]      nblk,
  output logic             busy,
  output logic             done,
  output logic             err,
  output logic [31:0]      blocks_written,
  output logic [15:0]      blocks_resent,
  // buffer
  input  logic [FIFO_AW:0] fifo_avail,
  output logic             fifo_commit,
  output logic             fifo_rewind,
  // command engine
  output logic             cmd_valid,
  input  logic             cmd_ready,
  output cmd_req_t         cmd_req,
  input  logic             cmd_done,
  input  cmd_rsp_t         cmd_rsp,
  // data transmitter
  output logic             tx_start,
  input  logic             tx_done,
  input  logic             tx_ok,
  // DAT0 (busy after CMD12)
  input  logic             dat0_i
);
  typedef enum logic [2:0] {S_IDLE, S_WAITDATA, S_CMD, S_DATA, S_STOP, S_BUSY, S_DONE} state_e;
  state_e state;

  logic        is_multi, sent, restart, tx_sent;
  logic [31:0] cur;
  logic [15:0] left;
  logic [3:0]  tries;    // rejected sends of the current block
  logic [3:0]  ctries;   // failed commands in a row
  logic [1:0]  bcnt;
  logic        r1_ok;
  logic [31:0] arg;

  assign arg   = BYTE_ADDR ? {cur[22:0], 9'b0} : cur;
  assign busy  = (state != S_IDLE);
  assign r1_ok = !cmd_rsp.timeout && !cmd_rsp.crc_err && (rsp_index(cmd_rsp.resp) == cmd_req.index);

  always_comb begin
    cmd_req = '{index: CMD_STOP, arg: 32'h0, rsp: RSP_R1};
    if (state == S_CMD)
      cmd_req = '{index: is_multi ? CMD_WRITE_MULTI : CMD_WRITE_SINGLE, arg: arg, rsp: RSP_R1};
  end
  assign cmd_valid = !sent && (state == S_CMD || state == S_STOP);
  assign tx_start  = (state == S_DATA) && !tx_sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      is_multi       <= 1'b0;
      sent           <= 1'b0;
      restart        <= 1'b0;
      tx_sent        <= 1'b0;
      cur            <= '0;
      left           <= '0;
      tries          <= '0;
      ctries         <= '0;
      bcnt           <= '0;
      done           <= 1'b0;
      err            <= 1'b0;
      blocks_written <= '0;
      blocks_resent  <= '0;
      fifo_commit    <= 1'b0;
      fifo_rewind    <= 1'b0;
    end else begin
      done        <= 1'b0;
      fifo_commit <= 1'b0;
      fifo_rewind <= 1'b0;
      if (cmd_valid && cmd_ready) sent <= 1'b1;
      if (tx_start) tx_sent <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          is_multi <= multi;
          cur      <= addr;
          left     <= nblk;
          tries    <= '0;
          ctries   <= '0;
          restart  <= 1'b0;
          err      <= 1'b0;
          if (nblk == 0)  state <= S_DONE;
          else if (multi) state <= S_CMD;
          else            state <= S_WAITDATA;
        end
        S_WAITDATA: if (fifo_avail >= (FIFO_AW+1)'(BLOCK_LEN)) begin
          state <= is_multi ? S_DATA : S_CMD;
        end
        S_CMD: if (cmd_done) begin
          sent <= 1'b0;
          if (r1_ok) begin
            ctries <= '0;
            state  <= is_multi ? S_WAITDATA : S_DATA;
          end else if (ctries == 4'(MAX_RETRY)) begin
            err   <= 1'b1;
            state <= S_DONE;
          end else begin
            ctries <= ctries + 1'b1;
          end
        end
        S_DATA: if (tx_done) begin
          tx_sent <= 1'b0;
          if (tx_ok) begin
            fifo_commit    <= 1'b1;
            blocks_written <= blocks_written + 1'b1;
            cur            <= cur + 1'b1;
            left           <= left - 1'b1;
            tries          <= '0;
            if (left == 1) state <= is_multi ? S_STOP : S_DONE;
            else           state <= S_WAITDATA;
          end else begin
            fifo_rewind   <= 1'b1;
            blocks_resent <= blocks_resent + 1'b1;
            tries         <= tries + 1'b1;
            if (tries == 4'(MAX_RETRY)) begin
              err   <= 1'b1;
              state <= is_multi ? S_STOP : S_DONE;
            end else if (is_multi) begin
              restart <= 1'b1;
              state   <= S_STOP;
            end else begin
              state <= S_CMD;
            end
          end
        end
        S_STOP: if (cmd_done) begin
          sent  <= 1'b0;
          bcnt  <= '0;
          if (!r1_ok) err <= 1'b1;
          state <= S_BUSY;
        end
        S_BUSY: if (rise_stb) begin
          if (bcnt != 2'd2) bcnt <= bcnt + 1'b1;
          else if (dat0_i) begin
            if (restart && !err) begin
              restart <= 1'b0;
              state   <= S_CMD;
            end else begin
              state <= S_DONE;
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (MAX_RETRY < 15) else $error("MAX_RETRY too large");
endmodule
