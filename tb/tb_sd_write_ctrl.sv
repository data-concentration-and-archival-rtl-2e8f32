// tb_sd_write_ctrl: the write controller with the command engine, the block
// transmitter, the buffer and the card model. Checks single-block writes
// (one CMD24 per block), a rejected block resent behind a new CMD24,
// a multiple-block write (CMD25 ... CMD12) with a rejected block in the
// middle, waiting for the buffer to fill, and giving up after MAX_RETRY
// rejections. The card's memory is compared with the bytes pushed in.
module tb_sd_write_ctrl;
  import sd_pkg::*;
  localparam int BL = 512;
  logic clk = 0, rst_n = 0;
  logic sd_clk, rise_stb, fall_stb;
  logic cmd_valid, cmd_ready, cmd_done;
  cmd_req_t cmd_req;
  cmd_rsp_t cmd_rsp;
  logic start = 0, multi = 0, busy, done, err;
  logic [31:0] addr = 0, blocks_written;
  logic [15:0] nblk = 0, blocks_resent;
  logic fifo_commit, fifo_rewind, tx_start, tx_done, tx_ok, tx_timeout, tx_busy;
  logic [2:0] tx_status;
  logic fifo_wr = 0, fifo_full, fifo_rd;
  logic [7:0] fifo_wdata = 0, fifo_rdata;
  logic [10:0] fifo_avail, fifo_level;
  logic cmd_o, cmd_oe, dat_o, dat_oe, card_cmd_o, card_cmd_oe, card_dat_o, card_dat_oe;
  logic cmd_line, dat_line;
  int checks = 0, failures = 0;

  sd_clk_gen #(.INIT_HALF(1), .FAST_HALF(1)) u_clk (.clk, .rst_n, .fast_sel(1'b1), .sd_clk, .rise_stb, .fall_stb);
  sd_cmd_engine u_cmd (.clk, .rst_n, .rise_stb, .fall_stb, .req_valid(cmd_valid), .req_ready(cmd_ready),
                       .req(cmd_req), .done(cmd_done), .rsp(cmd_rsp), .cmd_o, .cmd_oe, .cmd_i(cmd_line));
  sd_block_fifo #(.DEPTH(1024)) u_fifo (.clk, .rst_n, .wr_en(fifo_wr), .wr_data(fifo_wdata), .full(fifo_full),
                       .rd_en(fifo_rd), .rd_data(fifo_rdata), .avail(fifo_avail), .level(fifo_level),
                       .commit(fifo_commit), .rewind(fifo_rewind));
  sd_dat_tx #(.BUSY_TIMEOUT(10000)) u_tx (.clk, .rst_n, .rise_stb, .fall_stb, .start(tx_start), .busy(tx_busy),
                       .byte_in(fifo_rdata), .byte_take(fifo_rd), .done(tx_done), .status(tx_status),
                       .ok(tx_ok), .timeout(tx_timeout), .dat_o, .dat_oe, .dat_i(dat_line));
  sd_write_ctrl #(.FIFO_AW(10), .MAX_RETRY(3)) dut (
    .clk, .rst_n, .rise_stb, .start, .multi, .addr, .nblk, .busy, .done, .err,
    .blocks_written, .blocks_resent, .fifo_avail, .fifo_commit, .fifo_rewind,
    .cmd_valid, .cmd_ready, .cmd_req, .cmd_done, .cmd_rsp, .tx_start, .tx_done, .tx_ok,
    .dat0_i(dat_line));
  sd_card_model card (.sd_clk, .cmd_line, .cmd_o(card_cmd_o), .cmd_oe(card_cmd_oe),
                      .dat_line, .dat_o(card_dat_o), .dat_oe(card_dat_oe));

  assign cmd_line = cmd_oe ? cmd_o : (card_cmd_oe ? card_cmd_o : 1'b1);
  assign dat_line = dat_oe ? dat_o : (card_dat_oe ? card_dat_o : 1'b1);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  // data stream: byte n of the stream is 8'(n * 13 + n / 256)
  function automatic logic [7:0] pat(input int n);
    return 8'(n * 13 + n / 256);
  endfunction
  int pushed = 0;
  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin
      fifo_wr = 1; fifo_wdata = pat(pushed); pushed++;
      @(negedge clk);
    end
    fifo_wr = 0;
  endtask

  // compare card block b with stream bytes starting at s
  task automatic chk_block(input int b, input int s, input string what);
    int bad = 0;
    for (int i = 0; i < BL; i++) if (card.mem[(b % 16) * BL + i] != pat(s + i)) bad++;
    chk(bad == 0, $sformatf("%s: card block %0d has %0d wrong bytes", what, b, bad));
  endtask

  task automatic op(input bit m, input int a, input int n);
    @(negedge clk);
    multi = m; addr = 32'(a); nblk = 16'(n); start = 1;
    @(negedge clk); start = 0;
  endtask

  task automatic wait_done();
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);

    // two single-block writes
    push(2 * BL);
    op(0, 3, 2); wait_done();
    chk(!err && blocks_written == 2 && card.cmd_count[24] == 2, $sformatf("single x2: err %b written %0d CMD24 %0d", err, blocks_written, card.cmd_count[24]));
    chk_block(3, 0, "single"); chk_block(4, BL, "single");
    chk(fifo_level == 0, "buffer empty after commit");

    // single write, first attempt rejected: resent behind a new CMD24
    card.reject_next = 1;
    push(BL);
    op(0, 5, 1); wait_done();
    chk(!err && blocks_resent == 1 && card.cmd_count[24] == 4, $sformatf("single resend: resent %0d CMD24 %0d", blocks_resent, card.cmd_count[24]));
    chk_block(5, 2 * BL, "single resend");

    // multiple write of three blocks, the data arriving after the command;
    // the second block is rejected once
    op(1, 6, 3);
    repeat (3000) @(negedge clk);
    chk(busy && card.cmd_count[25] == 1 && !tx_busy, "multi waits for a full block");
    push(BL);
    while (blocks_written != 4) @(negedge clk);
    card.reject_next = 1;
    push(2 * BL);
    wait_done();
    chk(!err && blocks_written == 6 && blocks_resent == 2, $sformatf("multi: written %0d resent %0d", blocks_written, blocks_resent));
    chk(card.cmd_count[25] == 2 && card.cmd_count[12] == 2, $sformatf("multi: CMD25 %0d CMD12 %0d", card.cmd_count[25], card.cmd_count[12]));
    chk_block(6, 3 * BL, "multi"); chk_block(7, 4 * BL, "multi"); chk_block(8, 5 * BL, "multi");

    // a block rejected every time: error after MAX_RETRY resends, data kept
    card.reject_next = 100;
    push(BL);
    op(0, 9, 1); wait_done();
    chk(err && blocks_resent == 2 + 4, $sformatf("give up: err %b resent %0d", err, blocks_resent));
    chk(fifo_level == BL && fifo_avail == BL, "rejected block still buffered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
