// sd_dat_tx: sends one data block on DAT0 and collects the card's verdict.
//
// A written block travels on DAT0 as
//   0 (start) | BLOCK_BYTES*8 data bits, MSB of each byte first | CRC16 | 1 (end)
// with one bit per SD clock, driven on fall_stb. The bytes are pulled from a
// first-word-fall-through source: byte_take is a one-cycle pulse in the cycle
// that consumes byte_in. After the end bit the line is released and the card
// answers, two clocks later, with a start bit, a 3-bit CRC status and an end
// bit: 010 means the block arrived intact, 101 a transmission (CRC) error and
// 111 a programming error. The card then holds DAT0 low while it programs
// the flash; the engine waits for DAT0 to return high before done.
//
// Interface: start (one cycle, while idle) begins a block; done pulses once
// with status (the 3 CRC-status bits), ok (status == 010) and timeout (no
// status token within STAT_TIMEOUT clocks, or busy longer than BUSY_TIMEOUT).
// Timing: 1 + 8*BLOCK_BYTES + 16 + 1 SD clocks to send, then the status token
// and the card's busy time.
// Block format, the CRC16 and the status codes follow the design description;
// the timeouts and the two ignored clocks before busy is polled are this
// design's choice.
module sd_dat_tx
  import sd_pkg::*;
#(
  parameter int unsigned BLOCK_LEN    = BLOCK_BYTES,
  parameter int unsigned STAT_TIMEOUT = 64,
  parameter int unsigned BUSY_TIMEOUT = 6_250_000   // 250 ms at 25 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rise_stb,
  input  logic       fall_stb,
  input  logic       start,
  output logic       busy,
  // byte source
  input  logic [7:0] byte_in,
  output logic       byte_take,
  // result
  output logic       done,
  output logic [2:0] status,
  output logic       ok,
  output logic       timeout,
  // DAT0 line
  output logic       dat_o,
  output logic       dat_oe,
  input  logic       dat_i
);
  localparam int BITS = BLOCK_LEN * 8;
  localparam int BW   = $clog2(BITS + 1);
  localparam int TW   = $clog2(BUSY_TIMEOUT + STAT_TIMEOUT + 2);

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_DATA, S_CRC, S_END, S_RELEASE, S_WSTAT, S_STAT, S_BUSY
  } state_e;
  state_e state;

  logic [BW-1:0] bitcnt;
  logic [7:0]    sr;
  logic          cur_bit;
  logic [15:0]   crc;
  logic          crc_clr, crc_en;
  logic [TW-1:0] tcnt;
  logic [2:0]    stat_sr;
  logic [1:0]    scnt;

  assign busy      = (state != S_IDLE);
  assign byte_take = fall_stb && (state == S_DATA) && (bitcnt[2:0] == 3'd0);
  assign cur_bit   = (bitcnt[2:0] == 3'd0) ? byte_in[7] : sr[7];
  assign crc_clr   = start && (state == S_IDLE);
  assign crc_en    = fall_stb && (state == S_DATA);

  sd_crc16 u_crc (
    .clk, .rst_n, .clear(crc_clr), .en(crc_en), .din(cur_bit), .crc(crc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      bitcnt  <= '0;
      sr      <= '0;
      tcnt    <= '0;
      stat_sr <= '0;
      scnt    <= '0;
      dat_o   <= 1'b1;
      dat_oe  <= 1'b0;
      done    <= 1'b0;
      status  <= '0;
      ok      <= 1'b0;
      timeout <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ok      <= 1'b0;
          timeout <= 1'b0;
          status  <= '0;
          state   <= S_START;
        end
        S_START: if (fall_stb) begin
          dat_oe <= 1'b1;
          dat_o  <= 1'b0;
          bitcnt <= '0;
          state  <= S_DATA;
        end
        S_DATA: if (fall_stb) begin
          dat_o <= cur_bit;
          if (bitcnt[2:0] == 3'd0) sr <= {byte_in[6:0], 1'b0};
          else                     sr <= {sr[6:0], 1'b0};
          if (bitcnt == BW'(BITS - 1)) begin
            bitcnt <= '0;
            state  <= S_CRC;
          end else begin
            bitcnt <= bitcnt + 1'b1;
          end
        end
        S_CRC: if (fall_stb) begin
          dat_o  <= crc[15 - bitcnt[3:0]];
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt[3:0] == 4'd15) state <= S_END;
        end
        S_END: if (fall_stb) begin
          dat_o <= 1'b1;
          state <= S_RELEASE;
        end
        S_RELEASE: if (fall_stb) begin
          dat_oe <= 1'b0;
          tcnt   <= '0;
          state  <= S_WSTAT;
        end
        S_WSTAT: if (rise_stb) begin
          if (!dat_i) begin
            scnt  <= '0;
            state <= S_STAT;
          end else if (tcnt == TW'(STAT_TIMEOUT)) begin
            timeout <= 1'b1;
            done    <= 1'b1;
            state   <= S_IDLE;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_STAT: if (rise_stb) begin
          // three status bits, then the end bit
          if (scnt != 2'd3) begin
            stat_sr <= {stat_sr[1:0], dat_i};
            scnt    <= scnt + 1'b1;
          end else begin
            status <= stat_sr;
            ok     <= (stat_sr == CRC_STATUS_OK);
            tcnt   <= '0;
            state  <= S_BUSY;
          end
        end
        S_BUSY: if (rise_stb) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt >= TW'(2) && dat_i) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (tcnt == TW'(BUSY_TIMEOUT)) begin
            timeout <= 1'b1;
            ok      <= 1'b0;
            done    <= 1'b1;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // CRC bits come from the generator after the last data bit has been added.
  initial assert (BLOCK_LEN >= 2) else $error("BLOCK_LEN too small");
endmodule
