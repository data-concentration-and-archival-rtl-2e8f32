// sd_crc16: bit-serial CRC16 of an SD data line.
//
// Every block sent or received on a data line carries a 16-bit CRC after its
// data bits. This generator uses the CRC-CCITT polynomial x^16 + x^12 + x^5 + 1
// with a zero start value (the SD data CRC), fed most significant bit first.
// Interface: clear restarts the CRC at zero; when en is high the bit din is
// shifted in on the clock edge. crc is the running remainder; after the last
// data bit it holds the 16 bits to send (MSB first) or to compare with.
// One bit per cycle of en, result valid the cycle after the last bit.
// The 16-bit CRC follows the design description; the polynomial is the one
// the SD specification fixes.
module sd_crc16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic        din,
  output logic [15:0] crc
);
  logic fb;
  assign fb = din ^ crc[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (en)    crc <= {crc[14:12], crc[11] ^ fb, crc[10:5], crc[4] ^ fb, crc[3:0], fb};
  end
endmodule
