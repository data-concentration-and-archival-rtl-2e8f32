// sd_clk_gen: SD bus clock divider with two rates.
//
// An SD card must be identified with a slow clock (100-400 kHz) and is then
// accessed at up to 25 MHz. Both rates are derived here from the system clock
// by a half-period counter: the SD clock toggles every INIT_HALF system
// cycles while fast_sel is low and every FAST_HALF cycles once it is high.
// With the 50 MHz board clock the defaults give 100 kHz (the identification
// clock seen on the card) and 25 MHz (the data-transfer clock).
//
// Besides the clock itself the block gives two one-cycle strobes that are
// high in the system cycle whose edge makes the SD clock rise (rise_stb) or
// fall (fall_stb). The host drives CMD/DAT on fall_stb and samples the card
// on rise_stb, so the whole host runs in the system clock domain.
// A change of fast_sel takes effect at the next SD clock edge.
// The divider approach follows the design description; the exact divider
// values for a 50 MHz system clock are this design's choice.
module sd_clk_gen #(
  parameter int unsigned INIT_HALF = 250,  // 50 MHz / (2*250) = 100 kHz
  parameter int unsigned FAST_HALF = 1     // 50 MHz / (2*1)   = 25 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fast_sel,
  output logic sd_clk,
  output logic rise_stb,
  output logic fall_stb
);
  localparam int CW = $clog2(INIT_HALF > FAST_HALF ? INIT_HALF + 1 : FAST_HALF + 1);

  logic [CW-1:0] cnt;
  logic          last;

  // ">=" so that a switch to the shorter half period never skips past the end
  assign last     = fast_sel ? ({1'b0, cnt} + 1'b1 >= (CW+1)'(FAST_HALF))
                             : ({1'b0, cnt} + 1'b1 >= (CW+1)'(INIT_HALF));
  assign rise_stb = last && !sd_clk;
  assign fall_stb = last &&  sd_clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      sd_clk <= 1'b0;
    end else if (last) begin
      cnt    <= '0;
      sd_clk <= ~sd_clk;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial begin
    assert (INIT_HALF >= 1 && FAST_HALF >= 1) else $error("divider halves must be >= 1");
  end
endmodule
