// tb_sd_dat_tx: the testbench plays the card on DAT0. It captures each block
// the transmitter sends, checks the data, the CRC16 (computed here by
// polynomial division), the start/end bits and the length in SD clocks, then
// answers with a CRC status token and a busy period. Checks that 010 is
// reported as ok, 101 and 111 as failures, that done waits for the end of
// busy, and that a card that never answers gives a timeout.
module tb_sd_dat_tx;
  localparam int BLOCK_LEN = 512;
  localparam int BUSY      = 20;
  logic clk = 0, rst_n = 0;
  logic sd_clk, rise_stb, fall_stb;
  logic start = 0, busy, byte_take, done, ok, timeout, dat_o, dat_oe;
  logic [7:0] byte_in;
  logic [2:0] status;
  logic card_o = 1, card_oe = 0, dat_line;
  int checks = 0, failures = 0;

  sd_clk_gen #(.INIT_HALF(2), .FAST_HALF(1)) u_clk (.clk, .rst_n, .fast_sel(1'b0), .sd_clk, .rise_stb, .fall_stb);
  sd_dat_tx #(.BLOCK_LEN(BLOCK_LEN), .STAT_TIMEOUT(64), .BUSY_TIMEOUT(1000)) dut (
    .clk, .rst_n, .rise_stb, .fall_stb, .start, .busy, .byte_in, .byte_take,
    .done, .status, .ok, .timeout, .dat_o, .dat_oe, .dat_i(dat_line));

  assign dat_line = dat_oe ? dat_o : (card_oe ? card_o : 1'b1);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  // byte source
  logic [7:0] src [BLOCK_LEN];
  int idx;
  assign byte_in = src[idx % BLOCK_LEN];
  always @(posedge clk) if (byte_take) idx <= idx + 1;

  function automatic logic [15:0] crc16_ref(input int n);
    logic [15:0] r = 0;
    for (int i = 0; i < n; i++)
      for (int k = 7; k >= 0; k--) begin
        logic top;
        top = r[15] ^ src[i][k];
        r = {r[14:0], 1'b0};
        if (top) r = r ^ 16'h1021;
      end
    return r;
  endfunction

  // card side: capture one block, answer with token, then busy
  logic [7:0]  got [BLOCK_LEN];
  logic [15:0] got_crc;
  logic        got_end;
  int          oe_clks;
  time         busy_end;
  always @(posedge sd_clk) if (dat_oe) oe_clks <= oe_clks + 1;

  task automatic card_block(input logic [2:0] tok, input bit answer);
    do @(posedge sd_clk); while (dat_line);
    for (int b = 0; b < BLOCK_LEN; b++)
      for (int k = 7; k >= 0; k--) begin
        @(posedge sd_clk);
        got[b][k] = dat_line;
      end
    for (int k = 15; k >= 0; k--) begin
      @(posedge sd_clk);
      got_crc[k] = dat_line;
    end
    @(posedge sd_clk);
    got_end = dat_line;
    if (!answer) return;
    @(negedge sd_clk);
    @(negedge sd_clk);
    card_oe = 1; card_o = 0;
    for (int k = 2; k >= 0; k--) begin @(negedge sd_clk); card_o = tok[k]; end
    @(negedge sd_clk); card_o = 1;
    for (int k = 0; k < BUSY; k++) begin @(negedge sd_clk); card_o = 0; end
    @(negedge sd_clk); card_o = 1;
    busy_end = $time;
    @(negedge sd_clk); card_oe = 0;
  endtask

  task automatic run_block(input logic [2:0] tok, input bit answer, input string what);
    time t_done;
    idx = 0;
    oe_clks = 0;
    foreach (src[i]) src[i] = 8'($urandom);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      card_block(tok, answer);
      begin
        while (!done) @(negedge clk);
        t_done = $time;
      end
    join
    if (answer) wait (!busy);
    chk(got_end == 1'b1, {what, ": end bit"});
    chk(got_crc == crc16_ref(BLOCK_LEN), $sformatf("%s: CRC %h expected %h", what, got_crc, crc16_ref(BLOCK_LEN)));
    begin
      int bad = 0;
      for (int b = 0; b < BLOCK_LEN; b++) if (got[b] != src[b]) bad++;
      chk(bad == 0, $sformatf("%s: %0d bytes differ", what, bad));
    end
    chk(oe_clks == 1 + 8 * BLOCK_LEN + 16 + 1, $sformatf("%s: drove DAT0 for %0d clocks", what, oe_clks));
    chk(idx == BLOCK_LEN, $sformatf("%s: took %0d bytes", what, idx));
    if (answer) begin
      chk(status == tok && ok == (tok == 3'b010) && !timeout,
          $sformatf("%s: status %b ok %b timeout %b", what, status, ok, timeout));
      chk(t_done > busy_end, $sformatf("%s: done before the card left busy", what));
    end else begin
      chk(timeout && !ok, $sformatf("%s: timeout expected", what));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    run_block(3'b010, 1, "good block");
    run_block(3'b101, 1, "CRC error token");
    run_block(3'b111, 1, "programming error token");
    run_block(3'b010, 0, "no token");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
