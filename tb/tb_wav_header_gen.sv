// tb_wav_header_gen: collects the header through a randomly stalling
// consumer and compares it byte by byte with a header assembled here from
// the wav layout (field offsets 0..43).
module tb_wav_header_gen;
  logic clk = 0, rst_n = 0, start = 0, busy, out_valid, out_ready = 0;
  logic [31:0] data_bytes = 0;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  wav_header_gen #(.CHANNELS(2), .SAMPLE_RATE(44100), .BITS(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  logic [7:0] got [$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_data);

  function automatic void put32(ref logic [7:0] h [44], input int at, input logic [31:0] v);
    for (int i = 0; i < 4; i++) h[at + i] = v[8*i +: 8];
  endfunction

  task automatic run(input logic [31:0] n);
    logic [7:0] h [44];
    string tags = "RIFFWAVEfmt data";
    for (int i = 0; i < 4; i++) begin
      h[i] = tags[i]; h[8 + i] = tags[4 + i]; h[12 + i] = tags[8 + i]; h[36 + i] = tags[12 + i];
    end
    put32(h, 4, n + 36);
    put32(h, 16, 16);
    put32(h, 20, {16'd2, 16'd1});
    put32(h, 24, 44100);
    put32(h, 28, 44100 * 4);
    put32(h, 32, {16'd16, 16'd4});
    put32(h, 40, n);
    got.delete();
    @(negedge clk); data_bytes = n; start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    checks++;
    if (got.size() != 44) begin failures++; $display("FAIL %0d bytes", got.size()); end
    for (int i = 0; i < 44 && i < got.size(); i++) begin
      checks++;
      if (got[i] != h[i]) begin failures++; $display("FAIL byte %0d: %h expected %h", i, got[i], h[i]); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(32'd1004);
    run(32'h0012_3456);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
