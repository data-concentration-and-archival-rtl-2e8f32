// tb_sd_concentrator_full: one complete archival cycle with the concentrator
// at its default parameters (100 kHz identification clock from 50 MHz,
// 25 MHz transfers, 1024-byte buffer, 512-byte blocks): insert the card,
// identify it, archive one block of the live stream with a single-block
// write, read it back with a single-block read and compare.
module tb_sd_concentrator_full;
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

  sd_concentrator_top dut (.*);

  sd_card_model card (.sd_clk, .cmd_line(sd_cmd_i), .cmd_o(card_cmd_o), .cmd_oe(card_cmd_oe),
                      .dat_line(sd_dat0_i), .dat_o(card_dat_o), .dat_oe(card_dat_oe));
  sram_model sram (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .dq(sram_dq), .reads(sram_reads));

  assign sd_cmd_i  = sd_cmd_oe  ? sd_cmd_o  : (card_cmd_oe ? card_cmd_o : 1'b1);
  assign sd_dat0_i = sd_dat0_oe ? sd_dat0_o : (card_dat_oe ? card_dat_o : 1'b1);

  always #10 clk = ~clk;   // 50 MHz with a 1 ns unit

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  // live stream: one byte every 20 cycles
  int sent = 0, gcnt = 0;
  logic [7:0] accepted [$];
  always @(negedge clk) begin
    acq_valid = 0;
    if (init_done) begin
      if (gcnt == 19) begin
        gcnt = 0;
        acq_valid = 1;
        acq_data = 8'(sent * 37 + 5);
        sent++;
      end else gcnt++;
    end
  end
  always @(posedge clk) if (rst_n && acq_valid && !dut.fifo_full) accepted.push_back(acq_data);

  logic [7:0] got [$];
  always @(posedge clk) if (rst_n && rd_valid) got.push_back(rd_data);

  // slow clock period during identification
  int per;

  task automatic run_op(input op_e o, input int a, input int n);
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op = o; op_addr = 32'(a); op_nblk = 16'(n); op_start = 1;
    @(negedge clk);
    op_start = 0;
    while (!op_done) @(negedge clk);
  endtask

  initial begin
    longint t_init;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    card_detect_n = 0;
    @(posedge clk iff dut.rise_stb); @(posedge clk);
    per = 1;
    while (!dut.rise_stb) begin @(posedge clk); per++; end
    chk(per == 500, $sformatf("identification clock period %0d cycles (100 kHz)", per));
    wait (init_done || init_err);
    t_init = cyc;
    chk(init_done && card_rca == 16'h8000, $sformatf("identified, RCA %h", card_rca));
    $display("identification took %0d cycles (%0d us)", t_init, t_init / 50);

    run_op(OP_SINGLE_WRITE, 1, 1);
    chk(!op_err && blocks_written == 1, "single-block write");
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < BL; i++) if (card.mem[BL + i] != accepted[i]) bad++;
      chk(bad == 0, $sformatf("card holds the stream: %0d wrong", bad));
    end
    run_op(OP_SINGLE_READ, 1, 1);
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < BL; i++) if (got[i] != accepted[i]) bad++;
      chk(!op_err && got.size() == BL && bad == 0, $sformatf("read back: %0d bytes, %0d wrong", got.size(), bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
