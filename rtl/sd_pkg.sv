// sd_pkg: types and constants shared by the SD-card data concentrator.
//
// Holds the SD command indices used by the host, the response kinds the
// command engine understands, the command request structure that the
// controllers hand to the command engine, the transfer operation codes and
// the CRC7 function for 48-bit command frames. The command numbers and the
// "010" CRC-status token follow the design description; the CRC7 polynomial
// (x^7 + x^3 + 1) and the frame layout are those of the SD physical-layer
// specification.
package sd_pkg;

  // Command indices
  localparam logic [5:0] CMD_GO_IDLE       = 6'd0;
  localparam logic [5:0] CMD_ALL_SEND_CID  = 6'd2;
  localparam logic [5:0] CMD_SEND_RCA      = 6'd3;
  localparam logic [5:0] CMD_SELECT        = 6'd7;
  localparam logic [5:0] CMD_STOP          = 6'd12;
  localparam logic [5:0] CMD_READ_SINGLE   = 6'd17;
  localparam logic [5:0] CMD_READ_MULTI    = 6'd18;
  localparam logic [5:0] CMD_WRITE_SINGLE  = 6'd24;
  localparam logic [5:0] CMD_WRITE_MULTI   = 6'd25;
  localparam logic [5:0] ACMD_SD_SEND_OP   = 6'd41;
  localparam logic [5:0] CMD_APP           = 6'd55;

  // CRC status token returned by the card on DAT0 after a written block
  localparam logic [2:0] CRC_STATUS_OK       = 3'b010;
  localparam logic [2:0] CRC_STATUS_CRC_ERR  = 3'b101;
  localparam logic [2:0] CRC_STATUS_PROG_ERR = 3'b111;

  // Bytes per data block
  localparam int unsigned BLOCK_BYTES = 512;

  // What the command engine waits for after a command.
  //   RSP_NONE : nothing (CMD0)
  //   RSP_R1   : 48 bits, CRC7 checked (R1, R1b, R6)
  //   RSP_R3   : 48 bits, CRC field not checked (OCR response)
  //   RSP_R2   : 136 bits (CID/CSD)
  typedef enum logic [1:0] {RSP_NONE, RSP_R1, RSP_R3, RSP_R2} rsp_kind_e;

  typedef struct packed {
    logic [5:0]  index;
    logic [31:0] arg;
    rsp_kind_e   rsp;
  } cmd_req_t;

  // Result of one command
  typedef struct packed {
    logic [135:0] resp;      // received bits, right aligned (48-bit responses in [47:0])
    logic         timeout;   // no start bit within the response window
    logic         crc_err;   // CRC7 mismatch or missing end bit
  } cmd_rsp_t;

  typedef enum logic [1:0] {
    OP_SINGLE_WRITE = 2'd0,
    OP_MULTI_WRITE  = 2'd1,
    OP_SINGLE_READ  = 2'd2,
    OP_MULTI_READ   = 2'd3
  } op_e;

  // CRC7 of the first 40 bits of a command or response frame.
  function automatic logic [6:0] crc7_40(input logic [39:0] d);
    logic [6:0] c;
    logic       fb;
    c = '0;
    for (int i = 39; i >= 0; i--) begin
      fb = d[i] ^ c[6];
      c  = {c[5:0], 1'b0};
      c[0] = fb;
      c[3] = c[3] ^ fb;
    end
    return c;
  endfunction

  // Index field of a 48-bit response held in resp[47:0]
  function automatic logic [5:0] rsp_index(input logic [135:0] r);
    return r[45:40];
  endfunction

  // Argument field of a 48-bit response held in resp[47:0]
  function automatic logic [31:0] rsp_arg(input logic [135:0] r);
    return r[39:8];
  endfunction

endpackage
