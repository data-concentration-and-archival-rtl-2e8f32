// sram_reader: streams the contents of the external SRAM as bytes.
//
// Besides live data, the concentrator can archive a region of the board's
// external 16-bit SRAM to the card. This reader walks word addresses from
// base to base+words-1. For each word it drives the address with the chip
// and output enables active, waits WAIT_CYCLES system cycles for the data,
// latches it and then hands out its low byte and its high byte (little
// endian, the byte order of 16-bit wav samples) on a valid/ready byte stream.
//
// Interface: start (one cycle, while idle) with base and words; busy while
// it runs; out_valid/out_ready/out_data to the buffer. The SRAM is only read:
// sram_we_n stays high and both byte lanes are enabled.
// Timing: at best WAIT_CYCLES+1 cycles per word plus one cycle per byte the
// consumer is not ready.
// Reading from the synchronous SRAM follows the design description; the
// SRAM organisation (256K x 16), its read latency (data valid WAIT_CYCLES
// cycles after the address) and the byte order are this design's choice.
module sram_reader #(
  parameter int unsigned ADDR_W      = 18,
  parameter int unsigned WAIT_CYCLES = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [ADDR_W:0]   words,
  output logic              busy,
  // byte stream
  output logic              out_valid,
  output logic [7:0]        out_data,
  input  logic              out_ready,
  // SRAM
  output logic [ADDR_W-1:0] sram_addr,
  input  logic [15:0]       sram_dq,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  output logic              sram_ub_n,
  output logic              sram_lb_n
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_LO, S_HI} state_e;
  state_e state;

  logic [ADDR_W:0] left;
  logic [15:0]     word;
  logic [3:0]      wcnt;

  assign busy      = (state != S_IDLE);
  assign sram_we_n = 1'b1;
  assign sram_ub_n = 1'b0;
  assign sram_lb_n = 1'b0;
  assign sram_ce_n = !busy;
  assign sram_oe_n = (state != S_WAIT);
  assign out_valid = (state == S_LO) || (state == S_HI);
  assign out_data  = (state == S_HI) ? word[15:8] : word[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      left      <= '0;
      word      <= '0;
      wcnt      <= '0;
      sram_addr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && words != 0) begin
          sram_addr <= base;
          left      <= words;
          wcnt      <= '0;
          state     <= S_WAIT;
        end
        S_WAIT: begin
          if (wcnt == 4'(WAIT_CYCLES)) begin
            word  <= sram_dq;
            state <= S_LO;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        S_LO: if (out_ready) state <= S_HI;
        S_HI: if (out_ready) begin
          wcnt <= '0;
          if (left == 1) begin
            left  <= '0;
            state <= S_IDLE;
          end else begin
            left      <= left - 1'b1;
            sram_addr <= sram_addr + 1'b1;
            state     <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (WAIT_CYCLES < 16) else $error("WAIT_CYCLES too large");
endmodule
