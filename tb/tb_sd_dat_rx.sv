// tb_sd_dat_rx: the testbench plays the card and sends blocks on DAT0 with
// a CRC16 computed here by polynomial division. Checks the received bytes,
// a correct block, a block with a damaged CRC, a missing end bit, a block
// that never comes (timeout) and the cancel input.
module tb_sd_dat_rx;
  localparam int BLOCK_LEN = 512;
  logic clk = 0, rst_n = 0;
  logic sd_clk, rise_stb, fall_stb;
  logic arm = 0, cancel = 0, busy, byte_valid, done, crc_err, timeout;
  logic [7:0] byte_out;
  logic card_o = 1, card_oe = 0, dat_line;
  int checks = 0, failures = 0;

  sd_clk_gen #(.INIT_HALF(2), .FAST_HALF(1)) u_clk (.clk, .rst_n, .fast_sel(1'b0), .sd_clk, .rise_stb, .fall_stb);
  sd_dat_rx #(.BLOCK_LEN(BLOCK_LEN), .START_TIMEOUT(100)) dut (
    .clk, .rst_n, .rise_stb, .arm, .cancel, .busy, .byte_out, .byte_valid,
    .done, .crc_err, .timeout, .dat_i(dat_line));

  assign dat_line = card_oe ? card_o : 1'b1;

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

  logic [7:0] src [BLOCK_LEN];
  int nrx, nbad;
  always @(posedge clk) if (byte_valid) begin
    if (byte_out != src[nrx % BLOCK_LEN]) nbad <= nbad + 1;
    nrx <= nrx + 1;
  end

  function automatic logic [15:0] crc16_ref();
    logic [15:0] r = 0;
    for (int i = 0; i < BLOCK_LEN; i++)
      for (int k = 7; k >= 0; k--) begin
        logic top;
        top = r[15] ^ src[i][k];
        r = {r[14:0], 1'b0};
        if (top) r = r ^ 16'h1021;
      end
    return r;
  endfunction

  task automatic send_block(input logic [15:0] crc_xor, input logic endbit);
    logic [15:0] c;
    c = crc16_ref() ^ crc_xor;
    repeat (3) @(negedge sd_clk);
    card_oe = 1; card_o = 0;
    for (int b = 0; b < BLOCK_LEN; b++)
      for (int k = 7; k >= 0; k--) begin @(negedge sd_clk); card_o = src[b][k]; end
    for (int k = 15; k >= 0; k--) begin @(negedge sd_clk); card_o = c[k]; end
    @(negedge sd_clk); card_o = endbit;
    @(negedge sd_clk); card_oe = 0; card_o = 1;
  endtask

  task automatic run(input logic [15:0] crc_xor, input logic endbit, input string what);
    int sd0, sd1;
    nrx = 0; nbad = 0;
    foreach (src[i]) src[i] = 8'($urandom);
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    fork
      send_block(crc_xor, endbit);
      while (!done) @(negedge clk);
    join
    chk(nrx == BLOCK_LEN && nbad == 0, $sformatf("%s: %0d bytes, %0d wrong", what, nrx, nbad));
    chk(crc_err == (crc_xor != 0 || !endbit) && !timeout,
        $sformatf("%s: crc_err %b timeout %b", what, crc_err, timeout));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    run(16'h0000, 1'b1, "good block");
    run(16'h0100, 1'b1, "damaged CRC");
    run(16'h0000, 1'b0, "missing end bit");
    run(16'h0000, 1'b1, "good block again");
    // nothing sent: timeout after START_TIMEOUT clocks
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    while (!done) @(negedge clk);
    chk(timeout, "timeout when no block comes");
    // cancel returns to idle without done
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    repeat (10) @(negedge clk);
    cancel = 1; @(negedge clk); cancel = 0;
    @(negedge clk);
    chk(!busy, "cancel stops the receiver");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
