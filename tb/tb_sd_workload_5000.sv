// tb_sd_workload_5000: 5000 blocks archived and read back at full size.
//
// The concentrator runs with every parameter at its default (50 MHz system
// clock, 100 kHz identification, 25 MHz transfers, 1024-byte buffer). After
// the card is identified an acquisition stream of one byte every 19 system
// cycles (2.63 MB/s, slightly more than 5000 blocks of 512 bytes per second)
// is archived by a single multiple-block write of 5000 blocks, which must end
// within 1 s with no byte dropped. The 5000 blocks are then read back with
// one multiple-block read, which must end within 1.051 s with no CRC error.
// The card model keeps only 16 blocks (addresses wrap), so the card memory
// and the read data are compared with the last stream block written to each
// of its 16 slots. Stream byte n is 8'(n*37+5).
module tb_sd_workload_5000;
  import sd_pkg::*;
  localparam int BL    = 512;
  localparam int NBLK  = 5000;
  localparam int SLOTS = 16;
  localparam int GAP   = 19;
  logic clk = 0, rst_n = 0, card_detect_n = 1;
  logic sd_clk, sd_cmd_o, sd_cmd_oe, sd_cmd_i, sd_dat0_o, sd_dat0_oe, sd_dat0_i;
  logic acq_valid = 0;
  logic [7:0] acq_data = 0;
  logic op_start = 0, op_src_sram = 0, op_wav_header = 0;
  op_e op = OP_MULTI_WRITE;
  logic [31:0] op_addr = 0;
  logic [15:0] op_nblk = 0;
  logic [17:0] op_sram_base = 0, sram_addr;
  logic op_ready, op_done, op_err;
  logic rd_valid, rd_block_done, rd_block_bad;
  logic [7:0] rd_data;
  logic [15:0] sram_dq;
  logic sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  logic card_present, init_done, init_err;
  logic [15:0] card_rca, blocks_resent, blocks_bad;
  logic [31:0] blocks_written, blocks_read, dropped_bytes;
  logic [10:0] buf_level;
  logic card_cmd_o, card_cmd_oe, card_dat_o, card_dat_oe;
  int sram_reads;
  int checks = 0, failures = 0;

  sd_concentrator_top dut (.*);

  sd_card_model #(.MEM_BLOCKS(SLOTS)) card (.sd_clk, .cmd_line(sd_cmd_i), .cmd_o(card_cmd_o), .cmd_oe(card_cmd_oe),
                      .dat_line(sd_dat0_i), .dat_o(card_dat_o), .dat_oe(card_dat_oe));
  sram_model sram (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .dq(sram_dq), .reads(sram_reads));

  assign sd_cmd_i  = sd_cmd_oe  ? sd_cmd_o  : (card_cmd_oe ? card_cmd_o : 1'b1);
  assign sd_dat0_i = sd_dat0_oe ? sd_dat0_o : (card_dat_oe ? card_dat_o : 1'b1);

  always #10 clk = ~clk;   // 50 MHz with a 1 ns unit

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (120_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
    else $display("PASS %s", what);
  endtask

  function automatic logic [7:0] stream_byte(input longint n);
    return 8'(n * 37 + 5);
  endfunction

  // last block of the archive that lands in card slot s
  function automatic int last_in_slot(input int s);
    return s + SLOTS * ((NBLK - 1 - s) / SLOTS);
  endfunction

  // acquisition stream, only while stream_on
  bit stream_on = 0;
  int gcnt = 0;
  longint sent = 0;
  always @(negedge clk) begin
    acq_valid = 0;
    if (stream_on) begin
      if (gcnt == GAP - 1) begin
        gcnt = 0;
        acq_valid = 1;
        acq_data = stream_byte(sent);
        sent++;
      end else gcnt++;
    end
  end

  // read data against the expected slot contents
  longint rd_count = 0;
  int rd_wrong = 0;
  always @(posedge clk) if (rst_n && rd_valid) begin
    int blk, slot;
    blk  = int'(rd_count / BL);
    slot = blk % SLOTS;
    if (rd_data != stream_byte(longint'(last_in_slot(slot)) * BL + rd_count % BL)) rd_wrong++;
    rd_count++;
  end

  task automatic run_op(input op_e o, input int a, input int n, output longint t);
    longint t0;
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op = o; op_addr = 32'(a); op_nblk = 16'(n); op_start = 1;
    t0 = cyc;
    @(negedge clk);
    op_start = 0;
    while (!op_done) @(negedge clk);
    t = cyc - t0;
  endtask

  initial begin
    longint t_wr, t_rd;
    int bad;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    card_detect_n = 0;
    wait (init_done || init_err);
    chk(init_done, "card identified");

    // ---- write 5000 blocks from the live stream
    stream_on = 1;
    run_op(OP_MULTI_WRITE, 0, NBLK, t_wr);
    stream_on = 0;
    $display("write of %0d blocks: %0d cycles = %0d us", NBLK, t_wr, t_wr / 50);
    chk(!op_err && blocks_written == NBLK, $sformatf("%0d blocks written", blocks_written));
    chk(dropped_bytes == 0, $sformatf("no byte dropped (%0d)", dropped_bytes));
    chk(t_wr <= 64'd50_000_000, $sformatf("5000 blocks written within 1 s (%0d us)", t_wr / 50));
    bad = 0;
    for (int s = 0; s < SLOTS; s++)
      for (int i = 0; i < BL; i++)
        if (card.mem[s * BL + i] != stream_byte(longint'(last_in_slot(s)) * BL + i)) bad++;
    chk(bad == 0, $sformatf("card holds the last blocks of the stream: %0d wrong", bad));

    // ---- read them back
    repeat (100) @(negedge clk);
    run_op(OP_MULTI_READ, 0, NBLK, t_rd);
    $display("read of %0d blocks: %0d cycles = %0d us", NBLK, t_rd, t_rd / 50);
    chk(!op_err && blocks_read == NBLK && blocks_bad == 0, $sformatf("%0d blocks read, %0d bad", blocks_read, blocks_bad));
    chk(rd_count == longint'(NBLK) * BL && rd_wrong == 0, $sformatf("read data: %0d bytes, %0d wrong", rd_count, rd_wrong));
    chk(t_rd <= 64'd52_550_000, $sformatf("5000 blocks read within 1.051 s (%0d us)", t_rd / 50));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
