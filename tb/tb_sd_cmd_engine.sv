// tb_sd_cmd_engine: sends commands to the card model and checks the frames
// on the CMD line (against published frames such as 40 00 00 00 00 95 for
// CMD0), the decoded responses, a missing response (timeout) and a response
// damaged in flight (CRC error). It also checks that a frame takes exactly 48
// SD clocks.
module tb_sd_cmd_engine;
  import sd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sd_clk, rise_stb, fall_stb;
  logic req_valid = 0, req_ready, done;
  cmd_req_t req = '0;
  cmd_rsp_t rsp;
  logic cmd_o, cmd_oe, card_cmd_o, card_cmd_oe, card_dat_o, card_dat_oe;
  logic cmd_line, dat_line;
  logic mute = 0, flip = 0;
  int checks = 0, failures = 0;

  sd_clk_gen #(.INIT_HALF(3), .FAST_HALF(1)) u_clk (.clk, .rst_n, .fast_sel(1'b0), .sd_clk, .rise_stb, .fall_stb);
  sd_cmd_engine dut (.clk, .rst_n, .rise_stb, .fall_stb, .req_valid, .req_ready, .req,
                     .done, .rsp, .cmd_o, .cmd_oe, .cmd_i(cmd_line));
  sd_card_model card (.sd_clk, .cmd_line, .cmd_o(card_cmd_o), .cmd_oe(card_cmd_oe),
                      .dat_line, .dat_o(card_dat_o), .dat_oe(card_dat_oe));

  assign cmd_line = cmd_oe ? cmd_o : ((card_cmd_oe && !mute) ? (card_cmd_o ^ flip) : 1'b1);
  assign dat_line = card_dat_oe ? card_dat_o : 1'b1;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // capture what the host sends, bit by bit, as the card sees it
  logic [47:0] frame;
  int          fbits;
  logic was_oe = 0;
  always @(posedge sd_clk) begin
    was_oe <= cmd_oe;
    if (cmd_oe) begin
      frame <= {frame[46:0], cmd_o};
      fbits <= was_oe ? fbits + 1 : 1;
    end
  end

  // flip one bit in the middle of the next card response
  int rsp_bits;
  always @(negedge sd_clk) begin
    if (card_cmd_oe) rsp_bits <= rsp_bits + 1; else rsp_bits <= 0;
  end
  logic flip_arm = 0;
  always @(negedge sd_clk) flip <= flip_arm && (rsp_bits == 20);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(input logic [5:0] idx, input logic [31:0] arg, input rsp_kind_e k);
    @(negedge clk);
    req = '{index: idx, arg: arg, rsp: k};
    req_valid = 1;
    // valid is held until the engine has taken it
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(posedge sd_clk);

    issue(CMD_GO_IDLE, 32'h0, RSP_NONE);
    chk(frame == 48'h40_0000_0000_95, $sformatf("CMD0 frame %h", frame));
    chk(fbits == 48, $sformatf("CMD0 took %0d SD clocks", fbits));
    chk(!rsp.timeout && !rsp.crc_err, "CMD0 flags");

    issue(CMD_APP, 32'h0, RSP_R1);
    chk(frame == {8'h77, 32'h0, crc7_ref({8'h77, 32'h0}), 1'b1}, $sformatf("CMD55 frame %h", frame));
    chk(!rsp.timeout && !rsp.crc_err, "CMD55 flags");
    chk(rsp.resp[45:40] == 6'd55 && rsp.resp[39:8] == 32'h0000_0120, $sformatf("CMD55 response %h", rsp.resp[47:0]));

    issue(CMD_ALL_SEND_CID, 32'h0, RSP_R2);
    chk(!rsp.timeout && !rsp.crc_err, "CMD2 flags");
    chk(rsp.resp[127:8] == 120'h03_5344_5355_3031_4780_1234_5678_0089, $sformatf("CID %h", rsp.resp[127:8]));

    issue(CMD_SEND_RCA, 32'h0, RSP_R1);
    chk(!rsp.crc_err && rsp.resp[39:24] == 16'h8000, $sformatf("RCA %h", rsp.resp[39:24]));

    issue(CMD_READ_SINGLE, 32'h0, RSP_R1);
    chk(frame == 48'h51_0000_0000_55, $sformatf("CMD17 frame %h", frame));
    repeat (5000) @(posedge sd_clk);    // let the card finish its block

    mute = 1;
    issue(CMD_APP, 32'h0, RSP_R1);
    chk(rsp.timeout, "timeout when the card stays silent");
    mute = 0;

    flip_arm = 1;
    issue(CMD_APP, 32'h0, RSP_R1);
    chk(!rsp.timeout && rsp.crc_err, "CRC error on a damaged response");
    flip_arm = 0;

    issue(CMD_APP, 32'h0, RSP_R1);
    chk(!rsp.timeout && !rsp.crc_err, "clean response after the error");
    chk(card.bad_cmd_crc == 0, "card saw no bad command CRC");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent CRC7 reference (polynomial long division)
  function automatic logic [6:0] crc7_ref(input logic [39:0] d);
    logic [46:0] r;
    r = {d, 7'b0};
    for (int i = 46; i >= 7; i--)
      if (r[i]) r[i -: 8] = r[i -: 8] ^ 8'b1000_1001;
    return r[6:0];
  endfunction
endmodule
