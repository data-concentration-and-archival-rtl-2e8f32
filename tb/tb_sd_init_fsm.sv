// tb_sd_init_fsm: runs the identification sequence against the card model.
// Checks the command sequence (CMD0 once, CMD55/ACMD41 repeated while the
// card reports busy, CMD2, CMD3, CMD7), the published RCA and CID, the
// switch to the fast clock, and the two ways identification fails: a card
// that stays busy and a card that never answers.
module tb_sd_init_fsm;
  import sd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sd_clk, rise_stb, fall_stb;
  logic cmd_valid, cmd_ready, cmd_done;
  cmd_req_t cmd_req;
  cmd_rsp_t cmd_rsp;
  logic init_done, init_err;
  logic [15:0] rca;
  logic [31:0] ocr;
  logic [127:0] cid;
  logic [9:0] acmd41_rounds;
  logic cmd_o, cmd_oe, card_cmd_o, card_cmd_oe, card_dat_o, card_dat_oe, cmd_line, dat_line;
  logic mute = 0;
  int checks = 0, failures = 0;

  sd_clk_gen #(.INIT_HALF(3), .FAST_HALF(1)) u_clk (.clk, .rst_n, .fast_sel(init_done), .sd_clk, .rise_stb, .fall_stb);
  sd_cmd_engine u_cmd (.clk, .rst_n, .rise_stb, .fall_stb, .req_valid(cmd_valid), .req_ready(cmd_ready),
                       .req(cmd_req), .done(cmd_done), .rsp(cmd_rsp), .cmd_o, .cmd_oe, .cmd_i(cmd_line));
  sd_init_fsm #(.POWERUP_CLKS(80), .MAX_ACMD41(4)) dut (.*);
  sd_card_model card (.sd_clk, .cmd_line, .cmd_o(card_cmd_o), .cmd_oe(card_cmd_oe),
                      .dat_line, .dat_o(card_dat_o), .dat_oe(card_dat_oe));

  assign cmd_line = cmd_oe ? cmd_o : ((card_cmd_oe && !mute) ? card_cmd_o : 1'b1);
  assign dat_line = card_dat_oe ? card_dat_o : 1'b1;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic restart();
    @(negedge clk); rst_n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
  endtask

  int t0, per;
  int first_cmd_clk, sdclks;
  always @(posedge sd_clk) sdclks <= sdclks + 1;

  initial begin
    sdclks = 0;
    card.acmd41_busy = 2;
    restart();
    // no command before the power-up clocks
    wait (cmd_oe);
    first_cmd_clk = sdclks;
    chk(first_cmd_clk >= 80, $sformatf("first command after %0d clocks", first_cmd_clk));
    wait (init_done || init_err);
    chk(init_done && !init_err, "identification completes");
    chk(rca == 16'h8000, $sformatf("RCA %h", rca));
    chk(acmd41_rounds == 2, $sformatf("busy rounds %0d", acmd41_rounds));
    chk(ocr[31] && ocr[23:15] == 9'h1FF, $sformatf("OCR %h", ocr));
    chk(cid[127:8] == 120'h03_5344_5355_3031_4780_1234_5678_0089, "CID");
    chk(card.cmd_count[0] == 1 && card.cmd_count[55] == 3 && card.cmd_count[41] == 3 &&
        card.cmd_count[2] == 1 && card.cmd_count[3] == 1 && card.cmd_count[7] == 1,
        $sformatf("command counts 0:%0d 55:%0d 2:%0d 3:%0d 7:%0d", card.cmd_count[0],
                  card.cmd_count[55], card.cmd_count[2], card.cmd_count[3], card.cmd_count[7]));
    chk(card.acmd41_rounds == 3, $sformatf("ACMD41 sent %0d times", card.acmd41_rounds));
    // fast clock after identification
    @(posedge clk iff rise_stb);
    @(posedge clk);
    per = 1;
    while (!rise_stb) begin @(posedge clk); per++; end
    chk(per == 2, $sformatf("fast SD clock period %0d", per));

    // a card that stays busy: error after MAX_ACMD41 rounds
    card.acmd41_busy = 1000;
    restart();
    wait (init_done || init_err);
    chk(init_err && acmd41_rounds == 4, $sformatf("busy card: err %0d rounds %0d", init_err, acmd41_rounds));

    // a card that never answers
    mute = 1;
    restart();
    wait (init_done || init_err);
    chk(init_err && !init_done, "silent card gives init_err");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
