// sd_init_fsm: SD card identification sequence.
//
// After power-up the host must bring the card from idle to the standby state
// using only the CMD line and the slow identification clock:
//   power-up clocks -> CMD0 (reset, idle state)
//   -> CMD55 + ACMD41 (publish OCR)   repeated while the OCR busy bit says
//                                      the card is still powering up
//   -> CMD2 (publish CID, identification state)
//   -> CMD3 (publish RCA, standby state)
//   -> CMD7 with the RCA (select the card: transfer state)
// after which init_done rises and the data-transfer clock can be used.
// The FSM talks to the command engine through its request/result ports.
//
// Interface: starts on its own when reset is released; init_done and
// init_err are levels; rca, ocr and cid hold what the card published.
// A command with no answer, a bad CRC or a wrong index, or an ACMD41 loop
// longer than MAX_ACMD41 rounds ends in init_err.
// Timing: POWERUP_CLKS SD clocks, then one command after another.
// The sequence CMD0, CMD55/ACMD41 loop on busy, CMD2, CMD3 follows the
// design description. The power-up clocks, the ACMD41 voltage window
// argument, the closing CMD7 and the retry limit are from the SD
// specification or this design's choice.
module sd_init_fsm
  import sd_pkg::*;
#(
  parameter int unsigned POWERUP_CLKS = 80,
  parameter int unsigned MAX_ACMD41   = 500,
  parameter logic [31:0] OCR_WINDOW   = 32'h00FF_8000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rise_stb,
  // command engine
  output logic         cmd_valid,
  input  logic         cmd_ready,
  output cmd_req_t     cmd_req,
  input  logic         cmd_done,
  input  cmd_rsp_t     cmd_rsp,
  // status
  output logic         init_done,
  output logic         init_err,
  output logic [15:0]  rca,
  output logic [31:0]  ocr,
  output logic [127:0] cid,
  output logic [9:0]   acmd41_rounds
);
  typedef enum logic [3:0] {
    S_POWERUP, S_CMD0, S_CMD55, S_ACMD41, S_CMD2, S_CMD3, S_CMD7, S_DONE, S_ERR
  } state_e;
  state_e state;

  logic        sent;
  logic [15:0] pcnt;
  logic        r1_ok;

  // request for the current state
  always_comb begin
    cmd_req = '{index: CMD_GO_IDLE, arg: 32'h0, rsp: RSP_NONE};
    unique case (state)
      S_CMD55:  cmd_req = '{index: CMD_APP,          arg: 32'h0,         rsp: RSP_R1};
      S_ACMD41: cmd_req = '{index: ACMD_SD_SEND_OP,  arg: OCR_WINDOW,    rsp: RSP_R3};
      S_CMD2:   cmd_req = '{index: CMD_ALL_SEND_CID, arg: 32'h0,         rsp: RSP_R2};
      S_CMD3:   cmd_req = '{index: CMD_SEND_RCA,     arg: 32'h0,         rsp: RSP_R1};
      S_CMD7:   cmd_req = '{index: CMD_SELECT,       arg: {rca, 16'h0},  rsp: RSP_R1};
      default:  ;
    endcase
  end

  assign cmd_valid = !sent && (state inside {S_CMD0, S_CMD55, S_ACMD41, S_CMD2, S_CMD3, S_CMD7});
  assign r1_ok     = !cmd_rsp.timeout && !cmd_rsp.crc_err && (rsp_index(cmd_rsp.resp) == cmd_req.index);
  assign init_done = (state == S_DONE);
  assign init_err  = (state == S_ERR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_POWERUP;
      sent          <= 1'b0;
      pcnt          <= '0;
      rca           <= '0;
      ocr           <= '0;
      cid           <= '0;
      acmd41_rounds <= '0;
    end else begin
      if (cmd_valid && cmd_ready) sent <= 1'b1;
      unique case (state)
        S_POWERUP: if (rise_stb) begin
          if (pcnt == 16'(POWERUP_CLKS - 1)) state <= S_CMD0;
          pcnt <= pcnt + 1'b1;
        end
        S_CMD0: if (cmd_done) begin
          sent  <= 1'b0;
          state <= S_CMD55;
        end
        S_CMD55: if (cmd_done) begin
          sent  <= 1'b0;
          state <= r1_ok ? S_ACMD41 : S_ERR;
        end
        S_ACMD41: if (cmd_done) begin
          sent <= 1'b0;
          if (cmd_rsp.timeout || !cmd_rsp.resp[0]) begin
            state <= S_ERR;
          end else if (!rsp_arg(cmd_rsp.resp)[31]) begin
            // card is busy: back to idle and ask again
            acmd41_rounds <= acmd41_rounds + 1'b1;
            state <= (acmd41_rounds == 10'(MAX_ACMD41 - 1)) ? S_ERR : S_CMD55;
          end else begin
            ocr   <= rsp_arg(cmd_rsp.resp);
            state <= S_CMD2;
          end
        end
        S_CMD2: if (cmd_done) begin
          sent <= 1'b0;
          if (cmd_rsp.timeout || cmd_rsp.crc_err) begin
            state <= S_ERR;
          end else begin
            cid   <= {cmd_rsp.resp[127:1], 1'b1};
            state <= S_CMD3;
          end
        end
        S_CMD3: if (cmd_done) begin
          sent <= 1'b0;
          if (r1_ok) begin
            rca   <= rsp_arg(cmd_rsp.resp)[31:16];
            state <= S_CMD7;
          end else begin
            state <= S_ERR;
          end
        end
        S_CMD7: if (cmd_done) begin
          sent  <= 1'b0;
          state <= r1_ok ? S_DONE : S_ERR;
        end
        default: ;
      endcase
    end
  end

  initial assert (MAX_ACMD41 >= 1 && MAX_ACMD41 <= 1024) else $error("MAX_ACMD41 out of range");
endmodule
