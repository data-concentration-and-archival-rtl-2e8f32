// sd_read_ctrl: single- and multiple-block read from the SD card.
//
// Reads nblk blocks starting at card block addr, in one of two modes:
//   single (multi=0): a CMD17 per block;
//   multiple (multi=1): one CMD18, the blocks streamed back to back, and a
//     CMD12 (stop transmission) once the last wanted block has arrived.
// The block receiver is armed in the same cycle the read command is taken,
// so a data start bit that follows the command closely is not missed, and
// in multiple mode it is re-armed right after each block. Received bytes
// leave through sd_dat_rx; each finished block is counted, and a block with
// a CRC error is counted as bad and sets err (it is not read again). A read
// command without a valid response, or a block that never starts, ends the
// read with err. After CMD12 the controller waits for DAT0 to be released.
//
// Interface: start (one cycle, while idle) with multi, addr, nblk; done
// pulses at the end. Standard-capacity cards take byte addresses: with
// BYTE_ADDR set the command argument is addr*512.
// The two modes and the CMD17/CMD18/CMD12 commands follow the design
// description; error handling is this design's choice.
module sd_read_ctrl
  import sd_pkg::*;
#(
  parameter bit BYTE_ADDR = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rise_stb,
  // operation
  input  logic        start,
  input  logic        multi,
  input  logic [31:0] addr,
  input  logic [15:0] nblk,
  output logic        busy,
  output logic        done,
  output logic        err,
  output logic [31:0] blocks_read,
  output logic [15:0] blocks_bad,
  // command engine
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output cmd_req_t    cmd_req,
  input  logic        cmd_done,
  input  cmd_rsp_t    cmd_rsp,
  // data receiver
  output logic        rx_arm,
  output logic        rx_cancel,
  input  logic        rx_done,
  input  logic        rx_crc_err,
  input  logic        rx_timeout,
  // DAT0 (busy after CMD12)
  input  logic        dat0_i
);
  typedef enum logic [2:0] {S_IDLE, S_CMD, S_XFER, S_STOP, S_BUSY, S_DONE} state_e;
  state_e state;

  logic        is_multi, sent, cmd_fin, rx_fin, rearm;
  logic [31:0] cur;
  logic [15:0] left;
  logic [1:0]  bcnt;
  logic        r1_ok;
  logic [31:0] arg;

  assign arg   = BYTE_ADDR ? {cur[22:0], 9'b0} : cur;
  assign busy  = (state != S_IDLE);
  assign r1_ok = !cmd_rsp.timeout && !cmd_rsp.crc_err && (rsp_index(cmd_rsp.resp) == cmd_req.index);

  always_comb begin
    cmd_req = '{index: CMD_STOP, arg: 32'h0, rsp: RSP_R1};
    if (state == S_CMD || state == S_XFER)
      cmd_req = '{index: is_multi ? CMD_READ_MULTI : CMD_READ_SINGLE, arg: arg, rsp: RSP_R1};
  end
  assign cmd_valid = !sent && (state == S_CMD || state == S_STOP);
  assign rx_arm    = ((state == S_CMD) && cmd_valid && cmd_ready) || rearm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      is_multi    <= 1'b0;
      sent        <= 1'b0;
      cmd_fin     <= 1'b0;
      rx_fin      <= 1'b0;
      rearm       <= 1'b0;
      cur         <= '0;
      left        <= '0;
      bcnt        <= '0;
      done        <= 1'b0;
      err         <= 1'b0;
      rx_cancel    <= 1'b0;
      blocks_read <= '0;
      blocks_bad  <= '0;
    end else begin
      done     <= 1'b0;
      rearm    <= 1'b0;
      rx_cancel <= 1'b0;
      if (cmd_valid && cmd_ready) sent <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          is_multi <= multi;
          cur      <= addr;
          left     <= nblk;
          err      <= 1'b0;
          state    <= (nblk == 0) ? S_DONE : S_CMD;
        end
        S_CMD: if (cmd_valid && cmd_ready) begin
          cmd_fin <= 1'b0;
          rx_fin  <= 1'b0;
          state   <= S_XFER;
        end
        S_XFER: begin
          if (cmd_done) begin
            cmd_fin <= 1'b1;
            if (!r1_ok) begin
              err      <= 1'b1;
              rx_cancel <= 1'b1;
              sent     <= 1'b0;
              state    <= is_multi ? S_STOP : S_DONE;
            end
          end
          if (rx_done) begin
            if (rx_timeout) begin
              err   <= 1'b1;
              sent  <= 1'b0;
              state <= is_multi ? S_STOP : S_DONE;
            end else begin
              blocks_read <= blocks_read + 1'b1;
              if (rx_crc_err) begin
                err        <= 1'b1;
                blocks_bad <= blocks_bad + 1'b1;
              end
              cur  <= cur + 1'b1;
              left <= left - 1'b1;
              if (left == 1) begin
                rx_fin <= 1'b1;
                if (is_multi) begin
                  sent  <= 1'b0;
                  state <= S_STOP;
                end
              end else if (is_multi) begin
                rearm <= 1'b1;
              end else begin
                rx_fin <= 1'b1;
              end
            end
          end
          // single mode: next CMD17 once both command and block are finished
          if (!is_multi && cmd_fin && rx_fin && state == S_XFER) begin
            sent  <= 1'b0;
            state <= (left == 0) ? S_DONE : S_CMD;
          end
        end
        S_STOP: if (cmd_done) begin
          sent  <= 1'b0;
          bcnt  <= '0;
          if (!r1_ok) err <= 1'b1;
          state <= S_BUSY;
        end
        S_BUSY: if (rise_stb) begin
          if (bcnt != 2'd2)  bcnt  <= bcnt + 1'b1;
          else if (dat0_i)   state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
