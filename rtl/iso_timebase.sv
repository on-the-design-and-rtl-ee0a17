// iso_timebase: word and tick strobes derived from the bit clock.
//
// The whole design runs on one clock, the serial bit clock. This block
// divides it: word_en is high for one clock every WORD_W clocks (one word
// time, 40 ns at 1 GHz) and tick_en for one clock every WORD_W*WORDS_PER_TICK
// clocks (one arbitration tick, 320 ns). tick_en coincides with a word_en.
// Deriving all rates from one clock with enables is this design's choice.
module iso_timebase #(
  parameter int unsigned WORD_W         = iso_pkg::WORD_W,
  parameter int unsigned WORDS_PER_TICK = iso_pkg::WORDS_PER_TICK
) (
  input  logic clk,
  input  logic rst_n,
  output logic word_en,
  output logic tick_en
);
  localparam int unsigned BW = (WORD_W > 1) ? $clog2(WORD_W) : 1;
  localparam int unsigned TW = (WORDS_PER_TICK > 1) ? $clog2(WORDS_PER_TICK) : 1;

  logic [BW-1:0] bit_cnt;
  logic [TW-1:0] word_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt  <= '0;
      word_cnt <= '0;
    end else if (32'(bit_cnt) == WORD_W - 1) begin
      bit_cnt  <= '0;
      word_cnt <= (32'(word_cnt) == WORDS_PER_TICK - 1) ? '0 : word_cnt + 1'b1;
    end else begin
      bit_cnt  <= bit_cnt + 1'b1;
    end
  end

  assign word_en = (32'(bit_cnt) == WORD_W - 1);
  assign tick_en = word_en && (32'(word_cnt) == WORDS_PER_TICK - 1);
endmodule
