// wav_header_gen: emits the 44-byte header of a PCM wav file.
//
// Archived samples are stored on the card as a Windows wav file, so the
// first bytes of an archive are a RIFF/WAVE header. On start this block
// sends the canonical 44-byte header as a byte stream, ahead of the samples:
//   "RIFF" | 36+data_bytes | "WAVE" | "fmt " | 16 | 1 (PCM) | CHANNELS |
//   SAMPLE_RATE | byte rate | block align | BITS | "data" | data_bytes
// with all numbers little endian. Each byte is computed from its index, so
// no table is stored.
//
// Interface: start (one cycle, while idle) with data_bytes, the size of the
// sample data that will follow; out_valid/out_ready/out_data byte stream;
// busy until the 44th byte has been taken. One byte per cycle when ready.
// Storing the archive as a wav file follows the design description; the
// header layout is the standard one and the sample format parameters are
// this design's choice.
module wav_header_gen #(
  parameter int unsigned CHANNELS    = 1,
  parameter int unsigned SAMPLE_RATE = 8000,
  parameter int unsigned BITS        = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] data_bytes,
  output logic        busy,
  output logic        out_valid,
  output logic [7:0]  out_data,
  input  logic        out_ready
);
  localparam logic [31:0] BYTE_RATE   = 32'(SAMPLE_RATE * CHANNELS * BITS / 8);
  localparam logic [15:0] BLOCK_ALIGN = 16'(CHANNELS * BITS / 8);

  logic [5:0]  idx;
  logic [31:0] size;
  logic [31:0] word;     // the 4-byte group idx falls in
  logic [7:0]  lane [4];

  assign busy      = (idx != 6'd0) || out_valid;
  assign out_valid = (idx != 6'd0);

  // 4-byte group of the header that holds byte idx-1
  always_comb begin
    unique case (6'(idx - 6'd1) >> 2)
      6'd0:    word = "FFIR";                       // "RIFF" read low byte first
      6'd1:    word = size + 32'd36;
      6'd2:    word = "EVAW";                       // "WAVE"
      6'd3:    word = " tmf";                       // "fmt "
      6'd4:    word = 32'd16;
      6'd5:    word = {16'(CHANNELS), 16'd1};       // PCM, channels
      6'd6:    word = 32'(SAMPLE_RATE);
      6'd7:    word = BYTE_RATE;
      6'd8:    word = {16'(BITS), BLOCK_ALIGN};
      6'd9:    word = "atad";                       // "data"
      default: word = size;
    endcase
  end
  assign lane     = '{word[7:0], word[15:8], word[23:16], word[31:24]};
  assign out_data = lane[2'(idx - 6'd1)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      size <= '0;
    end else if (idx == 6'd0) begin
      if (start) begin
        idx  <= 6'd1;
        size <= data_bytes;
      end
    end else if (out_ready) begin
      idx <= (idx == 6'd44) ? 6'd0 : idx + 6'd1;
    end
  end
endmodule
