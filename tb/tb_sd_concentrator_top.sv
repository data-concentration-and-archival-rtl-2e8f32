// tb_sd_concentrator_top: end-to-end run of the data concentrator against
// the SD card and SRAM models, at a shortened identification clock.
//   card absent -> nothing happens; card inserted -> identification with
//   the ACMD41 busy loop, RCA 0x8000, switch to the fast clock;
//   live stream archived by single-block and multiple-block writes, one
//   block rejected by the card and resent; blocks read back by multiple and
//   single reads and compared; a read block with a bad CRC flagged; SRAM
//   regions archived by multiple-block write (read back), behind a wav file
//   header, and by single-block write; the buffer overflowing and bytes
//   counted as dropped; the card pulled out during a write and identified
//   again.
// The write rate with a full buffer is measured and must allow 5000 blocks
// per second at a 25 MHz SD clock. Every one of these mechanisms is counted
// and must have happened at least once.
module tb_sd_concentrator_top;
  import sd_pkg::*;
  localparam int BL = 512;
  logic clk = 0, rst_n = 0, card_detect_n = 1;
  logic sd_clk, sd_cmd_o, sd_cmd_oe, sd_cmd_i, sd_dat0_o, sd_dat0_oe, sd_dat0_i;
  logic acq_valid = 0;
  logic [7:0] acq_data = 0;
  logic op_start = 0, op_src_sram = 0, op_wav_header = 0;
  op_e op = OP_SINGLE_WRITE;
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

  sd_concentrator_top #(
    .INIT_HALF(4), .BUSY_TIMEOUT(100000), .START_TIMEOUT(100000)
  ) dut (.*);

  sd_card_model card (.sd_clk, .cmd_line(sd_cmd_i), .cmd_o(card_cmd_o), .cmd_oe(card_cmd_oe),
                      .dat_line(sd_dat0_i), .dat_o(card_dat_o), .dat_oe(card_dat_oe));
  sram_model sram (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .dq(sram_dq), .reads(sram_reads));

  // a pulled-out card drives nothing
  assign sd_cmd_i  = sd_cmd_oe  ? sd_cmd_o  : ((card_cmd_oe && !card_detect_n) ? card_cmd_o : 1'b1);
  assign sd_dat0_i = sd_dat0_oe ? sd_dat0_o : ((card_dat_oe && !card_detect_n) ? card_dat_o : 1'b1);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  // bus contention is an error
  int contention = 0;
  always @(posedge clk) if ((sd_cmd_oe && card_cmd_oe) || (sd_dat0_oe && card_dat_oe)) contention++;

  // ---------------- acquisition stream ----------------
  int  gap = 0;           // cycles between bytes, 0 = stream off
  int  gcnt = 0;
  bit  fill_only = 0;     // hold the stream while the buffer is full
  int  sent_bytes = 0;
  logic [7:0] accepted [$];   // bytes the buffer took, in order
  always @(negedge clk) begin
    acq_valid = 0;
    if (gap != 0 && !(fill_only && dut.fifo_full)) begin
      if (gcnt >= gap - 1) begin
        gcnt = 0;
        acq_valid = 1;
        acq_data = 8'(sent_bytes * 29 + sent_bytes / 200);
        sent_bytes++;
      end else gcnt++;
    end
  end
  int sram_taken = 0;
  int hdr_taken = 0;
  int hdr_pos = 0;
  // wav header expected for 8000 Hz, mono, 16-bit samples and n data bytes
  logic [7:0] wav_hdr [44];
  task automatic make_hdr(input int n);
    logic [31:0] f [11];
    f = '{32'h4646_4952, 32'(n + 36), 32'h4556_4157, 32'h2074_6d66, 32'd16, {16'd1, 16'd1},
          32'd8000, 32'd16000, {16'd16, 16'd2}, 32'h6174_6164, 32'(n)};
    for (int i = 0; i < 44; i++) wav_hdr[i] = f[i / 4][8 * (i % 4) +: 8];
  endtask
  // monitors start once the reset has reached every register
  always @(posedge clk) if (rst_n) begin
    if (acq_valid && !dut.src_sram && !dut.fifo_full) accepted.push_back(acq_data);
    // SRAM bytes: word base+i/2 holds (base+i/2)*3 + 0x1357, low byte first
    if (dut.src_sram && dut.hdr_valid && !dut.fifo_full) begin
      if (hdr_taken == 0) hdr_pos = accepted.size();
      accepted.push_back(wav_hdr[hdr_taken]);
      hdr_taken++;
    end
    if (dut.src_sram && dut.sram_valid && !dut.fifo_full && !dut.hdr_valid) begin
      logic [15:0] w;
      w = 16'((32'(op_sram_base) + sram_taken / 2) * 3 + 32'h1357);
      accepted.push_back((sram_taken % 2 == 0) ? w[7:0] : w[15:8]);
      sram_taken++;
    end
  end

  // expected archived bytes: the accepted stream, in order
  int next_arch = 0;
  int sram_first = 0;
  task automatic chk_card_stream(input int blk, input int n, input string what);
    int bad = 0;
    for (int i = 0; i < n * BL; i++)
      if (card.mem[((blk + i / BL) % 16) * BL + i % BL] != accepted[next_arch + i]) bad++;
    chk(bad == 0, $sformatf("%s: %0d archived bytes differ from the stream", what, bad));
    next_arch += n * BL;
  endtask

  // ---------------- read capture ----------------
  logic [7:0] got [$];
  int bad_blocks = 0;
  always @(posedge clk) if (rst_n) begin
    if (rd_valid) got.push_back(rd_data);
    if (rd_block_bad) bad_blocks++;
  end

  task automatic run_op(input op_e o, input int a, input int n, input bit from_sram, input int base);
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op = o; op_addr = 32'(a); op_nblk = 16'(n); op_src_sram = from_sram; op_sram_base = 18'(base);
    op_start = 1;
    @(negedge clk);
    op_start = 0;
    while (!op_done) @(negedge clk);
  endtask

  // mechanisms seen
  int m_card_detect = 0, m_busy_loop = 0, m_clk_switch = 0, m_single_wr = 0, m_multi_wr = 0,
      m_resend = 0, m_single_rd = 0, m_multi_rd = 0, m_bad_crc = 0, m_sram = 0, m_overflow = 0,
      m_removal = 0, m_wav = 0;

  initial begin
    int per;
    longint t0, t1;
    int wr_before;
    int drop_before;
    repeat (5) @(negedge clk);
    rst_n = 1;

    // ---- no card: nothing on the bus
    repeat (5000) @(negedge clk);
    chk(!card_present && !init_done && !sd_cmd_oe, "idle while no card");
    card_detect_n = 0;
    wait (init_done || init_err);
    chk(init_done && card_rca == 16'h8000, $sformatf("identified, RCA %h", card_rca));
    if (init_done) m_card_detect++;
    if (card.acmd41_rounds > 1) m_busy_loop++;
    @(posedge clk iff dut.rise_stb); @(posedge clk);
    per = 1;
    while (!dut.rise_stb) begin @(posedge clk); per++; end
    chk(per == 2, $sformatf("data transfer SD clock period %0d system cycles", per));
    if (per == 2) m_clk_switch++;

    $display("%0d stage: live stream dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    // ---- live stream, single-block writes
    gap = 20;
    run_op(OP_SINGLE_WRITE, 0, 2, 0, 0);
    chk(!op_err && blocks_written == 2 && card.cmd_count[24] == 2, "single write of two blocks");
    chk_card_stream(0, 2, "single write");
    if (!op_err) m_single_wr++;

    $display("%0d stage: multiple-block write dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    // ---- multiple-block write with one rejected block
    card.reject_next = 1;
    run_op(OP_MULTI_WRITE, 2, 3, 0, 0);
    chk(!op_err && blocks_written == 5 && blocks_resent == 1, $sformatf("multi write: written %0d resent %0d", blocks_written, blocks_resent));
    chk_card_stream(2, 3, "multi write");
    if (!op_err) m_multi_wr++;
    if (blocks_resent == 1) m_resend++;
    gap = 0;

    $display("%0d stage: read everything dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    // ---- read everything back
    got.delete();
    run_op(OP_MULTI_READ, 0, 5, 0, 0);
    begin
      int bad = 0;
      for (int i = 0; i < 5 * BL; i++) if (got[i] != accepted[i]) bad++;
      chk(!op_err && got.size() == 5 * BL && bad == 0, $sformatf("multi read: %0d bytes, %0d wrong", got.size(), bad));
      if (!op_err && bad == 0) m_multi_rd++;
    end
    got.delete();
    card.corrupt_next = 1;
    run_op(OP_SINGLE_READ, 3, 1, 0, 0);
    chk(op_err && bad_blocks == 1, "bad CRC on read reported");
    if (bad_blocks == 1) m_bad_crc++;
    got.delete();
    run_op(OP_SINGLE_READ, 3, 1, 0, 0);
    begin
      int bad = 0;
      for (int i = 0; i < BL; i++) if (got[i] != accepted[3 * BL + i]) bad++;
      chk(!op_err && bad == 0, $sformatf("single read: %0d wrong", bad));
      if (!op_err && bad == 0) m_single_rd++;
    end

    $display("%0d stage: SRAM region dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    // ---- SRAM region archived (multiple write) and read back
    // (bytes of the live stream still in the buffer go first)
    sram_taken = 0;
    sram_first = next_arch;
    op_sram_base = 18'h0100;
    run_op(OP_MULTI_WRITE, 8, 2, 1, 18'h0100);
    chk(!op_err && blocks_written == 7 && sram_taken == 2 * BL, $sformatf("SRAM archive, %0d SRAM bytes", sram_taken));
    chk_card_stream(8, 2, "SRAM archive");
    got.delete();
    run_op(OP_MULTI_READ, 8, 2, 0, 0);
    begin
      int bad = 0;
      for (int i = 0; i < 2 * BL; i++) if (got[i] != accepted[sram_first + i]) bad++;
      chk(bad == 0 && got.size() == 2 * BL, $sformatf("SRAM data read back: %0d wrong", bad));
      if (!op_err && bad == 0 && sram_reads > 0) m_sram++;
    end

    // ---- SRAM region archived as a wav file
    $display("%0d stage: wav archive dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    make_hdr(2 * BL - 44);
    hdr_taken = 0;
    sram_taken = 0;
    sram_first = next_arch;
    op_sram_base = 18'h0200;
    op_wav_header = 1;
    run_op(OP_MULTI_WRITE, 5, 2, 1, 18'h0200);
    op_wav_header = 0;
    chk(!op_err && hdr_taken == 44 && sram_taken == 2 * BL - 44, $sformatf("wav archive: %0d header, %0d SRAM bytes", hdr_taken, sram_taken));
    chk_card_stream(5, 2, "wav archive");
    begin
      int pos;
      int hb;
      pos = hdr_pos;               // the header follows any stream bytes still buffered
      hb = 0;
      for (int i = 0; i < 44; i++) if (accepted[pos + i] != wav_hdr[i]) hb++;
      chk(hb == 0 && wav_hdr[0] == 8'h52 && wav_hdr[3] == 8'h46, "header in place: RIFF ...");
      if (hb == 0 && !op_err) m_wav++;
    end

    // ---- one SRAM block by single-block write
    $display("%0d stage: SRAM single block dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    sram_taken = 0;
    op_sram_base = 18'h0300;
    wr_before = blocks_written;
    run_op(OP_SINGLE_WRITE, 7, 1, 1, 18'h0300);
    chk(!op_err && blocks_written == wr_before + 1 && sram_taken == BL, $sformatf("SRAM single-block write, %0d SRAM bytes", sram_taken));
    chk_card_stream(7, 1, "SRAM single-block write");

    $display("%0d stage: write rate dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    // ---- write rate: full buffer, two blocks in one multiple write
    while (dut.src_sram) @(negedge clk);
    drop_before = dropped_bytes;
    gap = 1;
    fill_only = 1;
    while (!dut.fifo_full) @(negedge clk);
    gap = 0;
    fill_only = 0;
    chk(dropped_bytes == drop_before, "no byte lost while filling");
    fork
      run_op(OP_MULTI_WRITE, 10, 2, 0, 0);
      begin
        @(posedge clk iff dut.tx_start); t0 = cyc;
        @(posedge clk iff dut.tx_done);
        @(posedge clk iff dut.tx_start);
        @(posedge clk iff dut.tx_done); t1 = cyc;
      end
    join
    chk_card_stream(10, 2, "buffered multi write");
    begin
      // two blocks; the SD clock is 2 system cycles
      int  sd_clks_per_block;
      real blocks_per_s;
      sd_clks_per_block = int'((t1 - t0) / 2 / 2);
      blocks_per_s = 25.0e6 / sd_clks_per_block;
      $display("write: %0d SD clocks per block, %0.0f blocks/s at 25 MHz", sd_clks_per_block, blocks_per_s);
      chk(blocks_per_s >= 5000.0, "5000 blocks per second");
    end

    $display("%0d stage: overflow dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    // ---- overflow: bytes arrive while nothing is written
    gap = 1;
    repeat (3000) @(negedge clk);
    gap = 0;
    chk(dropped_bytes > 0 && buf_level == 11'd1024, $sformatf("overflow: %0d dropped", dropped_bytes));
    if (dropped_bytes > 0) m_overflow++;
    // throw away the stream bytes that were not accepted from the reference
    // (they were never pushed), then archive the two buffered blocks
    run_op(OP_MULTI_WRITE, 12, 2, 0, 0);
    chk_card_stream(12, 2, "after overflow");

    $display("%0d stage: card pulled dropped=%0d level=%0d", cyc, dropped_bytes, buf_level);
    // ---- card pulled out during a write, then put back
    // (pulled while the writer waits for its second block; the card model
    // drops its transfer as a card losing power would)
    gap = 20;
    wr_before = blocks_written;
    fork
      begin
        while (!op_ready) @(negedge clk);
        op = OP_MULTI_WRITE; op_addr = 14; op_nblk = 3; op_src_sram = 0; op_start = 1;
        @(negedge clk); op_start = 0;
      end
      begin
        @(posedge clk iff dut.tx_done);
        repeat (200) @(negedge clk);
        card_detect_n = 1;
        card.stop_req = 1;
      end
    join
    next_arch += (blocks_written - wr_before) * BL;
    repeat (100) @(negedge clk);
    chk(!init_done && !dut.wr_busy && !sd_cmd_oe && !sd_dat0_oe, "removal aborts the write");
    card_detect_n = 0;
    wait (init_done || init_err);
    chk(init_done, "identified again after reinsertion");
    if (init_done) m_removal++;
    run_op(OP_MULTI_WRITE, 14, 2, 0, 0);
    gap = 0;
    chk(!op_err, "write after reinsertion");
    chk_card_stream(14, 2, "after reinsertion");

    chk(contention == 0, $sformatf("bus contention in %0d cycles", contention));
    chk(card.bad_cmd_crc == 0, "no command reached the card damaged");

    $display("mechanisms: card_detect=%0d busy_loop=%0d clk_switch=%0d single_wr=%0d multi_wr=%0d resend=%0d single_rd=%0d multi_rd=%0d bad_crc=%0d sram=%0d overflow=%0d removal=%0d wav=%0d",
             m_card_detect, m_busy_loop, m_clk_switch, m_single_wr, m_multi_wr, m_resend,
             m_single_rd, m_multi_rd, m_bad_crc, m_sram, m_overflow, m_removal, m_wav);
    chk(m_card_detect > 0 && m_busy_loop > 0 && m_clk_switch > 0 && m_single_wr > 0 && m_multi_wr > 0 &&
        m_resend > 0 && m_single_rd > 0 && m_multi_rd > 0 && m_bad_crc > 0 && m_sram > 0 &&
        m_overflow > 0 && m_removal > 0 && m_wav > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
