// sd_concentrator_top: FPGA data concentrator archiving to an SD card.
//
// A concentrator collects readings from many meters and keeps them locally
// until they are forwarded. Here the data arrives as a byte stream at a
// fixed rate, is collected in an on-chip buffer and is written, block by
// block, straight to a detachable SD card over the native 1-bit SD bus; no
// processor is involved. The card can also be read back, and a region of the
// board's external SRAM can be archived instead of the live stream.
//
// Structure:
//   sd_clk_gen     one divider, 100 kHz while the card is identified, then
//                  25 MHz (FAST_HALF) once it is selected
//   sd_init_fsm    CMD0, CMD55/ACMD41 loop, CMD2, CMD3, CMD7
//   sd_cmd_engine  CMD line, shared by the three controllers below
//   sd_write_ctrl  single (CMD24) / multiple (CMD25..CMD12) block write
//   sd_read_ctrl   single (CMD17) / multiple (CMD18..CMD12) block read
//   sd_dat_tx/rx   DAT0 block transmitter and receiver with CRC16
//   sd_block_fifo  internal buffer; a block leaves it only when the card
//                  has answered CRC status 010
//   sram_reader    external SRAM as an alternative byte source
//   wav_header_gen optional wav file header ahead of an SRAM archive
// The command engine belongs to the identification FSM until init_done,
// then to whichever transfer controller is running.
//
// Card detection: while card_detect_n is high (no card) every controller is
// held in reset; when a card is inserted identification starts by itself,
// and a card pulled out in the middle of a transfer aborts it and rewinds
// the buffer so no accepted byte is lost.
// Operations: with op_ready high, op_start for one cycle starts op (an op_e
// code) on op_nblk blocks at card block op_addr. For writes, op_src_sram
// takes the data from SRAM words op_sram_base onwards instead of from the
// acquisition stream, and op_wav_header then puts a 44-byte wav header in
// front of it (the SRAM filling the rest of the op_nblk blocks). op_done
// pulses at the end with op_err.
// Acquisition: acq_valid/acq_data, one byte per cycle at most, never held
// back; a byte that finds the buffer full is dropped and counted.
// Read data leaves on rd_valid/rd_data; rd_block_done marks the end of each
// block and rd_block_bad a block whose CRC16 did not match.
// SD lines are split into output, output enable and input for an external
// pad with pull-up; DAT1-DAT3 are not used in 1-bit mode.
// The block set, the four transfer modes, the SRAM source, the buffer, the
// resend on a bad CRC status and the two clock rates follow the design
// description. The single system clock (no PLL), the sharing of the command
// engine, the byte-stream interfaces, card-detect handling and all widths
// are this design's choices.
module sd_concentrator_top
  import sd_pkg::*;
#(
  parameter int unsigned INIT_HALF     = 250,
  parameter int unsigned FAST_HALF     = 1,
  parameter int unsigned BLOCK_LEN     = BLOCK_BYTES,
  parameter int unsigned FIFO_DEPTH    = 1024,
  parameter int unsigned POWERUP_CLKS  = 80,
  parameter int unsigned MAX_ACMD41    = 500,
  parameter int unsigned MAX_RETRY     = 3,
  parameter int unsigned BUSY_TIMEOUT  = 6_250_000,
  parameter int unsigned START_TIMEOUT = 2_500_000,
  parameter int unsigned SRAM_AW       = 18
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       card_detect_n,
  // SD bus (1-bit mode)
  output logic                       sd_clk,
  output logic                       sd_cmd_o,
  output logic                       sd_cmd_oe,
  input  logic                       sd_cmd_i,
  output logic                       sd_dat0_o,
  output logic                       sd_dat0_oe,
  input  logic                       sd_dat0_i,
  // acquisition stream
  input  logic                       acq_valid,
  input  logic [7:0]                 acq_data,
  // operation request
  input  logic                       op_start,
  input  op_e                        op,
  input  logic [31:0]                op_addr,
  input  logic [15:0]                op_nblk,
  input  logic                       op_src_sram,
  input  logic                       op_wav_header,
  input  logic [SRAM_AW-1:0]         op_sram_base,
  output logic                       op_ready,
  output logic                       op_done,
  output logic                       op_err,
  // data read back
  output logic                       rd_valid,
  output logic [7:0]                 rd_data,
  output logic                       rd_block_done,
  output logic                       rd_block_bad,
  // external SRAM
  output logic [SRAM_AW-1:0]         sram_addr,
  input  logic [15:0]                sram_dq,
  output logic                       sram_ce_n,
  output logic                       sram_oe_n,
  output logic                       sram_we_n,
  output logic                       sram_ub_n,
  output logic                       sram_lb_n,
  // status
  output logic                       card_present,
  output logic                       init_done,
  output logic                       init_err,
  output logic [15:0]                card_rca,
  output logic [31:0]                blocks_written,
  output logic [15:0]                blocks_resent,
  output logic [31:0]                blocks_read,
  output logic [15:0]                blocks_bad,
  output logic [31:0]                dropped_bytes,
  output logic [$clog2(FIFO_DEPTH):0] buf_level
);
  localparam int FAW = $clog2(FIFO_DEPTH);

  // ---------------- card detect and controller reset ----------------
  logic [1:0] cd_sync;
  logic       ctl_rst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cd_sync   <= 2'b00;
      ctl_rst_n <= 1'b0;
    end else begin
      cd_sync   <= {cd_sync[0], !card_detect_n};
      ctl_rst_n <= cd_sync[1];
    end
  end
  assign card_present = cd_sync[1];

  // ---------------- SD clock ----------------
  logic rise_stb, fall_stb;
  sd_clk_gen #(.INIT_HALF(INIT_HALF), .FAST_HALF(FAST_HALF)) u_clk (
    .clk, .rst_n(ctl_rst_n), .fast_sel(init_done), .sd_clk, .rise_stb, .fall_stb
  );

  // ---------------- command engine and its three users ----------------
  logic     cmd_valid, cmd_ready, cmd_done;
  cmd_req_t cmd_req;
  cmd_rsp_t cmd_rsp;

  logic     in_valid, wr_cvalid, rd_cvalid;
  cmd_req_t in_req, wr_creq, rd_creq;
  logic     wr_busy, rd_busy;

  sd_cmd_engine u_cmd (
    .clk, .rst_n(ctl_rst_n), .rise_stb, .fall_stb,
    .req_valid(cmd_valid), .req_ready(cmd_ready), .req(cmd_req),
    .done(cmd_done), .rsp(cmd_rsp),
    .cmd_o(sd_cmd_o), .cmd_oe(sd_cmd_oe), .cmd_i(sd_cmd_i)
  );

  always_comb begin
    if (!init_done) begin
      cmd_valid = in_valid;  cmd_req = in_req;
    end else if (wr_busy) begin
      cmd_valid = wr_cvalid; cmd_req = wr_creq;
    end else begin
      cmd_valid = rd_cvalid; cmd_req = rd_creq;
    end
  end

  logic [127:0] cid;
  logic [31:0]  ocr;
  logic [9:0]   acmd41_rounds;
  sd_init_fsm #(.POWERUP_CLKS(POWERUP_CLKS), .MAX_ACMD41(MAX_ACMD41)) u_init (
    .clk, .rst_n(ctl_rst_n), .rise_stb,
    .cmd_valid(in_valid), .cmd_ready(cmd_ready && !init_done), .cmd_req(in_req),
    .cmd_done, .cmd_rsp,
    .init_done, .init_err, .rca(card_rca), .ocr, .cid, .acmd41_rounds
  );

  // ---------------- operation dispatch ----------------
  logic sram_busy, hdr_busy, take;
  logic wr_start, rd_start, wr_done, rd_done, wr_err, rd_err;
  assign op_ready = init_done && !wr_busy && !rd_busy && !sram_busy && !hdr_busy;
  assign take     = op_start && op_ready;
  assign wr_start = take && (op == OP_SINGLE_WRITE || op == OP_MULTI_WRITE);
  assign rd_start = take && (op == OP_SINGLE_READ  || op == OP_MULTI_READ);
  assign op_done  = wr_done || rd_done;
  assign op_err   = (wr_done && wr_err) || (rd_done && rd_err);

  // ---------------- buffer and its two sources ----------------
  logic           fifo_wr, fifo_full, fifo_rd, fifo_commit, fifo_rewind, wr_commit, wr_rewind;
  logic [7:0]     fifo_wdata, fifo_rdata;
  logic [FAW:0]   fifo_avail;
  logic           sram_valid, sram_ready;
  logic [7:0]     sram_byte;
  logic           src_sram;
  logic           hdr_valid;
  logic [7:0]     hdr_byte;
  logic [31:0]    arch_bytes;
  logic           with_hdr;

  // the SRAM feeds the buffer from an SRAM write request to the end of that
  // write; the live stream at all other times
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       src_sram <= 1'b0;
    else if (wr_start)                src_sram <= op_src_sram;
    else if (wr_done || !ctl_rst_n)   src_sram <= 1'b0;
  end

  // An SRAM archive can be written as a wav file: the 44-byte header goes
  // first and the SRAM supplies the remaining bytes of the nblk blocks.
  assign with_hdr   = op_src_sram && op_wav_header;
  assign arch_bytes = 32'(op_nblk) * BLOCK_LEN - (with_hdr ? 32'd44 : 32'd0);

  wav_header_gen u_wav (
    .clk, .rst_n(ctl_rst_n),
    .start(wr_start && with_hdr), .data_bytes(arch_bytes), .busy(hdr_busy),
    .out_valid(hdr_valid), .out_data(hdr_byte), .out_ready(!fifo_full)
  );

  sram_reader #(.ADDR_W(SRAM_AW)) u_sram (
    .clk, .rst_n(ctl_rst_n),
    .start(wr_start && op_src_sram), .base(op_sram_base),
    .words((SRAM_AW+1)'(arch_bytes >> 1)), .busy(sram_busy),
    .out_valid(sram_valid), .out_data(sram_byte), .out_ready(sram_ready),
    .sram_addr, .sram_dq, .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_ub_n, .sram_lb_n
  );

  assign sram_ready = !fifo_full && !hdr_valid;
  assign fifo_wr    = src_sram ? (hdr_valid || sram_valid) : acq_valid;
  assign fifo_wdata = src_sram ? (hdr_valid ? hdr_byte : sram_byte) : acq_data;
  assign fifo_commit = wr_commit;
  assign fifo_rewind = wr_rewind || !ctl_rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dropped_bytes <= '0;
    else if (acq_valid && (src_sram || fifo_full)) dropped_bytes <= dropped_bytes + 1'b1;
  end

  sd_block_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(fifo_wr), .wr_data(fifo_wdata), .full(fifo_full),
    .rd_en(fifo_rd), .rd_data(fifo_rdata), .avail(fifo_avail), .level(buf_level),
    .commit(fifo_commit), .rewind(fifo_rewind)
  );

  // ---------------- write path ----------------
  logic       tx_start, tx_done, tx_ok, tx_timeout, tx_busy;
  logic [2:0] tx_status;

  sd_write_ctrl #(.BLOCK_LEN(BLOCK_LEN), .FIFO_AW(FAW), .MAX_RETRY(MAX_RETRY)) u_wr (
    .clk, .rst_n(ctl_rst_n), .rise_stb,
    .start(wr_start), .multi(op == OP_MULTI_WRITE), .addr(op_addr), .nblk(op_nblk),
    .busy(wr_busy), .done(wr_done), .err(wr_err),
    .blocks_written, .blocks_resent,
    .fifo_avail, .fifo_commit(wr_commit), .fifo_rewind(wr_rewind),
    .cmd_valid(wr_cvalid), .cmd_ready(cmd_ready && init_done && wr_busy), .cmd_req(wr_creq),
    .cmd_done, .cmd_rsp,
    .tx_start, .tx_done, .tx_ok, .dat0_i(sd_dat0_i)
  );

  sd_dat_tx #(.BLOCK_LEN(BLOCK_LEN), .BUSY_TIMEOUT(BUSY_TIMEOUT)) u_tx (
    .clk, .rst_n(ctl_rst_n), .rise_stb, .fall_stb,
    .start(tx_start), .busy(tx_busy),
    .byte_in(fifo_rdata), .byte_take(fifo_rd),
    .done(tx_done), .status(tx_status), .ok(tx_ok), .timeout(tx_timeout),
    .dat_o(sd_dat0_o), .dat_oe(sd_dat0_oe), .dat_i(sd_dat0_i)
  );

  // ---------------- read path ----------------
  logic rx_arm, rx_cancel, rx_done, rx_crc_err, rx_timeout, rx_busy;

  sd_read_ctrl u_rd (
    .clk, .rst_n(ctl_rst_n), .rise_stb,
    .start(rd_start), .multi(op == OP_MULTI_READ), .addr(op_addr), .nblk(op_nblk),
    .busy(rd_busy), .done(rd_done), .err(rd_err),
    .blocks_read, .blocks_bad,
    .cmd_valid(rd_cvalid), .cmd_ready(cmd_ready && init_done && !wr_busy), .cmd_req(rd_creq),
    .cmd_done, .cmd_rsp,
    .rx_arm, .rx_cancel, .rx_done, .rx_crc_err, .rx_timeout,
    .dat0_i(sd_dat0_i)
  );

  sd_dat_rx #(.BLOCK_LEN(BLOCK_LEN), .START_TIMEOUT(START_TIMEOUT)) u_rx (
    .clk, .rst_n(ctl_rst_n), .rise_stb,
    .arm(rx_arm), .cancel(rx_cancel), .busy(rx_busy),
    .byte_out(rd_data), .byte_valid(rd_valid),
    .done(rx_done), .crc_err(rx_crc_err), .timeout(rx_timeout),
    .dat_i(sd_dat0_i)
  );

  assign rd_block_done = rx_done && !rx_timeout;
  assign rd_block_bad  = rx_done && rx_crc_err;

  // The host never drives DAT0 while it is expecting data from the card.
  assert property (@(posedge clk) disable iff (!rst_n || !ctl_rst_n) !(sd_dat0_oe && rx_busy))
    else $error("DAT0 driven while receiving");
endmodule
