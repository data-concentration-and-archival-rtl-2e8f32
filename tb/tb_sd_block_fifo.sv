// tb_sd_block_fifo: write, read, rewind, commit and full behaviour of the
// block buffer against a queue model.
module tb_sd_block_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, commit = 0, rewind = 0, full;
  logic [7:0] wr_data = 0, rd_data;
  logic [4:0] avail, level;
  int checks = 0, failures = 0;

  sd_block_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // all inputs change on the falling edge
  task automatic push(input logic [7:0] v);
    wr_en = 1; wr_data = v; @(negedge clk); wr_en = 0;
  endtask

  task automatic pop(input logic [7:0] exp);
    chk(rd_data == exp, $sformatf("read %h expected %h", rd_data, exp));
    rd_en = 1; @(negedge clk); rd_en = 0;
  endtask

  task automatic pulse_rewind();
    rewind = 1; @(negedge clk); rewind = 0; @(negedge clk);
  endtask

  task automatic pulse_commit();
    commit = 1; @(negedge clk); commit = 0; @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 10; i++) push(8'(8'h30 + i));
    chk(level == 10 && avail == 10, "level after 10 writes");
    for (int i = 0; i < 6; i++) pop(8'(8'h30 + i));
    chk(avail == 4 && level == 10, "avail 4, level unchanged before commit");
    // rewind: the same six bytes come back
    pulse_rewind();
    chk(avail == 10, "avail restored by rewind");
    for (int i = 0; i < 6; i++) pop(8'(8'h30 + i));
    pulse_commit();
    chk(level == 4, "commit frees space");
    // fill to full: 12 more fit
    for (int i = 0; i < 12; i++) push(8'(8'h80 + i));
    chk(full == 1 && level == 16, "full at DEPTH");
    push(8'hEE);                         // refused
    chk(level == 16, "write while full refused");
    for (int i = 6; i < 10; i++) pop(8'(8'h30 + i));
    for (int i = 0; i < 12; i++) pop(8'(8'h80 + i));
    chk(avail == 0 && full == 1, "read does not free space before commit");
    pulse_commit();
    chk(level == 0 && !full, "empty after commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
