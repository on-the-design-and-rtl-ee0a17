// output_line_card: one outport of the Isoswitch.
//
// Words from the switching fabric pass through the delay module and are
// then shifted out on the serial line (optical conversion is outside this
// RTL). A word whose status bit is 0 (the outport was idle in that word
// time) is not transmitted: the serial line stays invalid (svalid = 0) for
// that word time. The serialiser is loaded one clock after word_en, once the
// delay module's output register holds the word, so words leave back to
// back without gaps. Delay in front of the serialiser follows the document;
// the load timing is this design's choice.
module output_line_card #(
  parameter int unsigned WORD_W = iso_pkg::WORD_W,
  parameter int unsigned DLY_AW = iso_pkg::DLY_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              word_en,
  input  logic [WORD_W-1:0] word,
  input  logic              word_valid,
  input  logic              h_delay_we,
  input  logic [DLY_AW-1:0] h_delay,
  output logic              sdata,
  output logic              svalid,
  output logic              sent     // pulses when a word starts on the line
);
  logic [WORD_W-1:0] dly_word;
  logic              dly_en;
  logic              word_en_q;

  delay_module #(.WORD_W(WORD_W), .DLY_AW(DLY_AW)) u_delay (
    .clk, .rst_n, .word_en, .in_word(word), .in_busy(word_valid),
    .h_delay_we, .h_delay, .out_word(dly_word), .out_en(dly_en), .delay_q()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word_en_q <= 1'b0;
    else        word_en_q <= word_en;
  end

  assign sent = word_en_q && dly_en;

  parallel_to_serial #(.WORD_W(WORD_W)) u_p2s (
    .clk, .rst_n, .load(sent), .word(dly_word), .sdata, .svalid
  );
endmodule
