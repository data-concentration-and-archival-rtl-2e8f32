// sd_card_model: behavioural model of an SD memory card in 1-bit SD bus mode.
//
// Not synthesizable; used by the testbenches in place of a real card.
// It decodes 48-bit host commands on CMD (sampled on the rising SD clock,
// CRC7 checked), answers with R1/R2/R3/R6 responses two clocks after the
// command, and moves 512-byte blocks on DAT0 (driven on the falling edge):
//   - identification: CMD0, CMD55, ACMD41 (answers "busy" for the first
//     acmd41_busy rounds), CMD2 (CID), CMD3 (publishes RCA), CMD7;
//   - write: CMD24 / CMD25 blocks with CRC16 check, CRC status token two
//     clocks after the end bit (010 good, 101 bad), then BUSY_CLKS clocks of
//     busy on DAT0; CMD12 ends a multiple write;
//   - read: CMD17 / CMD18, each block NAC clocks after the previous event,
//     CMD12 stops a multiple read at once.
// Block data is kept in a small memory of MEM_BLOCKS blocks (addresses wrap).
// Knobs for tests: reject_next (answer 101 to that many coming blocks),
// corrupt_next (send that many read blocks with a wrong CRC).
module sd_card_model #(
  parameter logic [15:0] RCA        = 16'h8000,
  parameter int          BLOCK_LEN  = 512,
  parameter int          MEM_BLOCKS = 16,
  parameter int          BUSY_CLKS  = 8,
  parameter int          NAC        = 4
) (
  input  logic sd_clk,
  input  logic cmd_line,
  output logic cmd_o,
  output logic cmd_oe,
  input  logic dat_line,
  output logic dat_o,
  output logic dat_oe
);
  logic [7:0] mem [MEM_BLOCKS*BLOCK_LEN];

  int acmd41_busy  = 2;
  int reject_next  = 0;
  int corrupt_next = 0;
  // statistics
  int cmd_count [64];
  int blocks_ok       = 0;
  int blocks_rejected = 0;
  int blocks_sent     = 0;
  int bad_cmd_crc     = 0;
  int acmd41_rounds   = 0;

  logic        app_cmd  = 0;
  logic        stop_req = 0;
  logic [31:0] ocr      = 32'h00FF_8000;
  logic [1:0]  xfer     = 0;       // 0 none, 1 write, 2 read
  logic        xfer_multi = 0;
  int          xfer_addr  = 0;
  event        go_xfer;

  initial begin
    cmd_o = 1; cmd_oe = 0; dat_o = 1; dat_oe = 0;
    foreach (cmd_count[i]) cmd_count[i] = 0;
    foreach (mem[i]) mem[i] = 8'(i * 7 + 3);
  end

  function automatic logic [6:0] crc7(input logic [39:0] d);
    logic [6:0] c = 0;
    for (int i = 39; i >= 0; i--) begin
      logic fb = d[i] ^ c[6];
      c = {c[5:0], fb} ^ {3'b000, fb, 3'b000};
    end
    return c;
  endfunction

  function automatic logic [15:0] crc16_step(input logic [15:0] c, input logic b);
    logic fb = b ^ c[15];
    return {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
  endfunction

  task automatic send_cmd_bits(input logic [135:0] bits, input int len);
    @(negedge sd_clk);            // host releases CMD here
    for (int i = len - 1; i >= 0; i--) begin
      @(negedge sd_clk);
      cmd_oe = 1;
      cmd_o  = bits[i];
    end
    @(negedge sd_clk);
    cmd_oe = 0;
    cmd_o  = 1;
  endtask

  task automatic send_r1(input logic [5:0] idx, input logic [31:0] status);
    logic [39:0] h = {2'b00, idx, status};
    send_cmd_bits({88'h0, h, crc7(h), 1'b1}, 48);
  endtask

  // ---------------- command process ----------------
  // (loops live in automatic tasks so that their local declarations are
  // initialised on every pass)
  initial cmd_loop();
  initial data_loop();

  task automatic cmd_loop();
    logic [47:0] f;
    forever begin
      @(posedge sd_clk);
      if (!cmd_line && !cmd_oe) begin
        f = 0;
        for (int i = 46; i >= 0; i--) begin
          @(posedge sd_clk);
          f[i] = cmd_line;
        end
        if (f[46] !== 1'b1 || f[0] !== 1'b1 || crc7({1'b0, f[46:8]}) != f[7:1]) begin
          bad_cmd_crc++;
        end else begin
          logic [5:0]  idx = f[45:40];
          logic [31:0] arg = f[39:8];
          cmd_count[idx]++;
          if (app_cmd && idx == 6'd41) begin
            app_cmd = 0;
            acmd41_rounds++;
            if (acmd41_rounds > acmd41_busy) ocr[31] = 1'b1;
            send_cmd_bits({88'h0, 2'b00, 6'b111111, ocr, 7'b1111111, 1'b1}, 48);
          end else begin
            app_cmd = 0;
            unique case (idx)
              6'd0:  begin ocr[31] = 1'b0; acmd41_rounds = 0; end
              6'd55: begin app_cmd = 1; send_r1(idx, 32'h0000_0120); end
              6'd2:  send_cmd_bits({2'b00, 6'b111111, 120'h03_5344_5355_3031_4780_1234_5678_0089, 7'h55, 1'b1}, 136);
              6'd3:  begin
                logic [39:0] h = {2'b00, 6'd3, RCA, 16'h0500};
                send_cmd_bits({88'h0, h, crc7(h), 1'b1}, 48);
              end
              6'd7:  send_r1(idx, 32'h0000_0700);
              6'd12: begin stop_req = 1; send_r1(idx, 32'h0000_0B00); end
              6'd17, 6'd18, 6'd24, 6'd25: begin
                send_r1(idx, 32'h0000_0900);
                xfer       = (idx >= 6'd24) ? 2'd1 : 2'd2;
                xfer_multi = (idx == 6'd18 || idx == 6'd25);
                xfer_addr  = int'(arg) / BLOCK_LEN;
                stop_req   = 0;
                -> go_xfer;
              end
              default: send_r1(idx, 32'h0000_0004);
            endcase
          end
        end
      end
    end
  endtask

  // ---------------- data process ----------------
  task automatic data_loop();
    forever begin
      @(go_xfer);
      if (xfer == 2'd1) begin
        // write: receive blocks until done (single) or CMD12 (multiple)
        bit again = 1;
        while (again) begin
          logic [15:0] crc, rx_crc;
          logic [7:0]  blk [BLOCK_LEN];
          logic        endb;
          logic [2:0]  st;
          // wait for a start bit or a stop request
          do @(posedge sd_clk); while (dat_line && !stop_req);
          if (stop_req) break;
          crc = 0;
          for (int b = 0; b < BLOCK_LEN; b++) begin
            for (int k = 7; k >= 0; k--) begin
              @(posedge sd_clk);
              blk[b][k] = dat_line;
              crc = crc16_step(crc, dat_line);
            end
          end
          for (int k = 15; k >= 0; k--) begin
            @(posedge sd_clk);
            rx_crc[k] = dat_line;
          end
          @(posedge sd_clk);
          endb = dat_line;
          if (reject_next > 0) begin
            reject_next--;
            st = 3'b101;
          end else if (crc != rx_crc || !endb) begin
            st = 3'b101;
          end else begin
            st = 3'b010;
          end
          if (st == 3'b010) begin
            for (int b = 0; b < BLOCK_LEN; b++)
              mem[(xfer_addr % MEM_BLOCKS) * BLOCK_LEN + b] = blk[b];
            xfer_addr++;
            blocks_ok++;
          end else begin
            blocks_rejected++;
          end
          // CRC status two clocks after the end bit, then busy
          @(negedge sd_clk);
          @(negedge sd_clk);
          dat_oe = 1; dat_o = 0;
          for (int k = 2; k >= 0; k--) begin
            @(negedge sd_clk);
            dat_o = st[k];
          end
          @(negedge sd_clk);
          dat_o = 1;
          for (int k = 0; k < BUSY_CLKS; k++) begin
            @(negedge sd_clk);
            dat_o = 0;
          end
          @(negedge sd_clk);
          dat_o = 1;
          @(negedge sd_clk);
          dat_oe = 0;
          again = xfer_multi;
        end
      end else if (xfer == 2'd2) begin
        bit again = 1;
        while (again && !stop_req) begin
          logic [15:0] crc = 0;
          for (int k = 0; k < NAC && !stop_req; k++) @(negedge sd_clk);
          if (stop_req) break;
          @(negedge sd_clk);
          dat_oe = 1; dat_o = 0;
          for (int b = 0; b < BLOCK_LEN && !stop_req; b++) begin
            logic [7:0] v = mem[(xfer_addr % MEM_BLOCKS) * BLOCK_LEN + b];
            for (int k = 7; k >= 0; k--) begin
              @(negedge sd_clk);
              dat_o = v[k];
              crc = crc16_step(crc, v[k]);
            end
          end
          if (corrupt_next > 0) begin
            corrupt_next--;
            crc = ~crc;
          end
          for (int k = 15; k >= 0 && !stop_req; k--) begin
            @(negedge sd_clk);
            dat_o = crc[k];
          end
          if (!stop_req) begin
            @(negedge sd_clk);
            dat_o = 1;
            blocks_sent++;
          end
          @(negedge sd_clk);
          dat_oe = 0; dat_o = 1;
          xfer_addr++;
          again = xfer_multi;
        end
        dat_oe = 0; dat_o = 1;
      end
      xfer = 0;
    end
  endtask
endmodule
