// sd_dat_rx: receives one data block from DAT0 and checks its CRC16.
//
// When armed, the receiver samples DAT0 on every rise_stb and waits for the
// start bit (0). It then shifts in BLOCK_LEN bytes, MSB first, handing each
// byte out with a one-cycle byte_valid pulse as soon as its eighth bit has
// arrived, then the 16 CRC bits and the end bit. The CRC16 of the data bits
// is computed on the fly and compared with the received one.
//
// Interface: arm (one cycle, while idle) starts waiting for a block; cancel
// returns it to idle. done pulses once with crc_err (CRC mismatch or missing
// end bit) or timeout (no start bit within START_TIMEOUT SD clocks).
// Bytes are passed on before the CRC is known: a consumer that must not keep
// a damaged block discards it when done comes with crc_err.
// Timing: 1 + 8*BLOCK_LEN + 16 + 1 SD clocks after the start bit.
// Block format and CRC16 follow the design description; the timeout and the
// cancel input are this design's choice.
module sd_dat_rx
  import sd_pkg::*;
#(
  parameter int unsigned BLOCK_LEN     = BLOCK_BYTES,
  parameter int unsigned START_TIMEOUT = 2_500_000   // 100 ms at 25 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rise_stb,
  input  logic       arm,
  input  logic       cancel,
  output logic       busy,
  output logic [7:0] byte_out,
  output logic       byte_valid,
  output logic       done,
  output logic       crc_err,
  output logic       timeout,
  input  logic       dat_i
);
  localparam int BITS = BLOCK_LEN * 8;
  localparam int BW   = $clog2(BITS + 1);
  localparam int TW   = $clog2(START_TIMEOUT + 1);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_DATA, S_CRC, S_END} state_e;
  state_e state;

  logic [BW-1:0] bitcnt;
  logic [TW-1:0] tcnt;
  logic [7:0]    sr;
  logic [15:0]   crc, crc_rx;
  logic          crc_clr, crc_en;

  assign busy    = (state != S_IDLE);
  assign crc_clr = arm && (state == S_IDLE);
  assign crc_en  = rise_stb && (state == S_DATA);

  sd_crc16 u_crc (
    .clk, .rst_n, .clear(crc_clr), .en(crc_en), .din(dat_i), .crc(crc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      bitcnt     <= '0;
      tcnt       <= '0;
      sr         <= '0;
      crc_rx     <= '0;
      byte_out   <= '0;
      byte_valid <= 1'b0;
      done       <= 1'b0;
      crc_err    <= 1'b0;
      timeout    <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      done       <= 1'b0;
      if (cancel) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (arm) begin
            tcnt    <= '0;
            crc_err <= 1'b0;
            timeout <= 1'b0;
            state   <= S_WAIT;
          end
          S_WAIT: if (rise_stb) begin
            if (!dat_i) begin
              bitcnt <= '0;
              state  <= S_DATA;
            end else if (tcnt == TW'(START_TIMEOUT)) begin
              timeout <= 1'b1;
              done    <= 1'b1;
              state   <= S_IDLE;
            end else begin
              tcnt <= tcnt + 1'b1;
            end
          end
          S_DATA: if (rise_stb) begin
            sr <= {sr[6:0], dat_i};
            if (bitcnt[2:0] == 3'd7) begin
              byte_out   <= {sr[6:0], dat_i};
              byte_valid <= 1'b1;
            end
            if (bitcnt == BW'(BITS - 1)) begin
              bitcnt <= '0;
              state  <= S_CRC;
            end else begin
              bitcnt <= bitcnt + 1'b1;
            end
          end
          S_CRC: if (rise_stb) begin
            crc_rx <= {crc_rx[14:0], dat_i};
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt[3:0] == 4'd15) state <= S_END;
          end
          S_END: if (rise_stb) begin
            crc_err <= !dat_i || (crc_rx != crc);
            done    <= 1'b1;
            state   <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  initial assert (BLOCK_LEN >= 2) else $error("BLOCK_LEN too small");
endmodule
