// sd_cmd_engine: SD bus CMD line master.
//
// All card identification happens on the CMD line alone, and every data
// transfer is opened and closed by a command there. This engine takes a
// command request (index, 32-bit argument, expected response kind) through a
// valid/ready handshake, sends the 48-bit frame
//   0 (start) | 1 (host) | index[5:0] | arg[31:0] | CRC7 | 1 (end)
// MSB first, one bit per SD clock on fall_stb, then releases the line and
// waits for the card's response start bit (sampled on rise_stb). It collects
// 48 or 136 bits, checks the end bit and, for R1-type responses, the CRC7,
// and reports the result with a one-cycle done pulse. No response within
// RSP_TIMEOUT SD clocks sets timeout. After every command the engine keeps
// the line idle for GAP_CLKS SD clocks before it accepts the next one.
//
// Timing: 48 SD clocks to send, 2..RSP_TIMEOUT clocks of turnaround, 48 or
// 136 clocks of response, GAP_CLKS clocks of gap.
// The frame, command set and 48-bit response follow the design description;
// the CRC7 check, the timeout and gap lengths are from the SD specification
// or this design's choice. CRC7 is not checked for R2 and R3 responses.
module sd_cmd_engine
  import sd_pkg::*;
#(
  parameter int unsigned RSP_TIMEOUT = 64,
  parameter int unsigned GAP_CLKS    = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rise_stb,
  input  logic     fall_stb,
  // request
  input  logic     req_valid,
  output logic     req_ready,
  input  cmd_req_t req,
  // result
  output logic     done,
  output cmd_rsp_t rsp,
  // CMD line
  output logic     cmd_o,
  output logic     cmd_oe,
  input  logic     cmd_i
);
  typedef enum logic [2:0] {S_IDLE, S_TX, S_WAIT, S_RX, S_CHECK, S_GAP} state_e;
  state_e state;

  logic [47:0]  tx_sr;
  logic [7:0]   cnt;
  logic [135:0] rx_sr;
  rsp_kind_e    kind;
  logic [7:0]   rx_len;

  assign req_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      tx_sr  <= '1;
      cnt    <= '0;
      rx_sr  <= '0;
      kind   <= RSP_NONE;
      rx_len <= '0;
      cmd_o  <= 1'b1;
      cmd_oe <= 1'b0;
      done   <= 1'b0;
      rsp    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          tx_sr  <= {2'b01, req.index, req.arg, crc7_40({2'b01, req.index, req.arg}), 1'b1};
          kind   <= req.rsp;
          rx_len <= (req.rsp == RSP_R2) ? 8'd136 : 8'd48;
          cnt    <= 8'd48;
          state  <= S_TX;
        end
        S_TX: if (fall_stb) begin
          if (cnt != 0) begin
            cmd_oe <= 1'b1;
            cmd_o  <= tx_sr[47];
            tx_sr  <= {tx_sr[46:0], 1'b1};
            cnt    <= cnt - 1'b1;
          end else begin
            cmd_oe <= 1'b0;
            cmd_o  <= 1'b1;
            cnt    <= '0;
            rsp    <= '0;
            if (kind == RSP_NONE) begin
              done  <= 1'b1;
              state <= S_GAP;
            end else begin
              state <= S_WAIT;
            end
          end
        end
        S_WAIT: if (rise_stb) begin
          if (!cmd_i) begin
            rx_sr <= '0;
            cnt   <= 8'd1;
            state <= S_RX;
          end else if (cnt == 8'(RSP_TIMEOUT)) begin
            rsp.timeout <= 1'b1;
            done        <= 1'b1;
            cnt         <= '0;
            state       <= S_GAP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_RX: if (rise_stb) begin
          rx_sr <= {rx_sr[134:0], cmd_i};
          cnt   <= cnt + 1'b1;
          if (cnt + 1'b1 == rx_len) state <= S_CHECK;
        end
        S_CHECK: begin
          rsp.resp    <= rx_sr;
          rsp.crc_err <= !rx_sr[0] ||
                         ((kind == RSP_R1) && (crc7_40(rx_sr[47:8]) != rx_sr[7:1]));
          done        <= 1'b1;
          cnt         <= '0;
          state       <= S_GAP;
        end
        S_GAP: if (rise_stb) begin
          if (cnt == 8'(GAP_CLKS)) state <= S_IDLE;
          else                     cnt   <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request, once raised, is held until the engine takes it.
  property p_req_held;
    @(posedge clk) disable iff (!rst_n) (req_valid && !req_ready) |=> req_valid;
  endproperty
  assert property (p_req_held) else $error("command request dropped before it was taken");

  initial assert (RSP_TIMEOUT < 255 && GAP_CLKS < 255) else $error("counter too narrow");
endmodule
