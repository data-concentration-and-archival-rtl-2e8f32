// tb_sd_read_ctrl: the read controller with the command engine, the block
// receiver and the card model. Checks single-block reads (one CMD17 per
// block), a multiple-block read (CMD18 ... CMD12) that stops after the
// wanted blocks, the bytes delivered against the card's memory, and a block
// with a bad CRC being flagged.
module tb_sd_read_ctrl;
  import sd_pkg::*;
  localparam int BL = 512;
  logic clk = 0, rst_n = 0;
  logic sd_clk, rise_stb, fall_stb;
  logic cmd_valid, cmd_ready, cmd_done;
  cmd_req_t cmd_req;
  cmd_rsp_t cmd_rsp;
  logic start = 0, multi = 0, busy, done, err;
  logic [31:0] addr = 0, blocks_read;
  logic [15:0] nblk = 0, blocks_bad;
  logic rx_arm, rx_cancel, rx_done, rx_crc_err, rx_timeout, rx_busy, byte_valid;
  logic [7:0] byte_out;
  logic cmd_o, cmd_oe, card_cmd_o, card_cmd_oe, card_dat_o, card_dat_oe;
  logic cmd_line, dat_line;
  int checks = 0, failures = 0;

  sd_clk_gen #(.INIT_HALF(1), .FAST_HALF(1)) u_clk (.clk, .rst_n, .fast_sel(1'b1), .sd_clk, .rise_stb, .fall_stb);
  sd_cmd_engine u_cmd (.clk, .rst_n, .rise_stb, .fall_stb, .req_valid(cmd_valid), .req_ready(cmd_ready),
                       .req(cmd_req), .done(cmd_done), .rsp(cmd_rsp), .cmd_o, .cmd_oe, .cmd_i(cmd_line));
  sd_dat_rx #(.START_TIMEOUT(5000)) u_rx (.clk, .rst_n, .rise_stb, .arm(rx_arm), .cancel(rx_cancel), .busy(rx_busy),
                       .byte_out, .byte_valid, .done(rx_done), .crc_err(rx_crc_err), .timeout(rx_timeout),
                       .dat_i(dat_line));
  sd_read_ctrl dut (
    .clk, .rst_n, .rise_stb, .start, .multi, .addr, .nblk, .busy, .done, .err,
    .blocks_read, .blocks_bad, .cmd_valid, .cmd_ready, .cmd_req, .cmd_done, .cmd_rsp,
    .rx_arm, .rx_cancel, .rx_done, .rx_crc_err, .rx_timeout, .dat0_i(dat_line));
  sd_card_model card (.sd_clk, .cmd_line, .cmd_o(card_cmd_o), .cmd_oe(card_cmd_oe),
                      .dat_line, .dat_o(card_dat_o), .dat_oe(card_dat_oe));

  assign cmd_line = cmd_oe ? cmd_o : (card_cmd_oe ? card_cmd_o : 1'b1);
  assign dat_line = card_dat_oe ? card_dat_o : 1'b1;

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] got [8 * BL];
  int ngot;
  always @(posedge clk) if (byte_valid) begin
    if (ngot < 8 * BL) got[ngot] <= byte_out;
    ngot <= ngot + 1;
  end

  task automatic read_op(input bit m, input int a, input int n, input string what);
    int bad;
    ngot = 0;
    @(negedge clk);
    multi = m; addr = 32'(a); nblk = 16'(n); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    bad = 0;
    for (int i = 0; i < n * BL; i++)
      if (got[i] != card.mem[((a + i / BL) % 16) * BL + i % BL]) bad++;
    chk(ngot == n * BL && bad == 0, $sformatf("%s: %0d bytes, %0d wrong", what, ngot, bad));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);

    read_op(0, 2, 2, "single x2");
    chk(!err && blocks_read == 2 && card.cmd_count[17] == 2, $sformatf("single: err %b read %0d CMD17 %0d", err, blocks_read, card.cmd_count[17]));

    read_op(1, 5, 3, "multi x3");
    chk(!err && blocks_read == 5 && card.cmd_count[18] == 1 && card.cmd_count[12] == 1,
        $sformatf("multi: err %b read %0d CMD18 %0d CMD12 %0d", err, blocks_read, card.cmd_count[18], card.cmd_count[12]));
    repeat (200) @(negedge clk);
    chk(card.blocks_sent == 5 && !card_dat_oe, $sformatf("card stopped after %0d blocks", card.blocks_sent));

    card.corrupt_next = 1;
    read_op(1, 9, 2, "multi with a bad CRC");
    chk(err && blocks_bad == 1 && blocks_read == 7, $sformatf("bad CRC: err %b bad %0d", err, blocks_bad));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
