// delay_module: programmable delay of an outport's word stream.
//
// A dual-port RAM of 2**DLY_AW words, each with a status bit, written at
// PCW and read at PCR. On every word time the incoming word is written at
// PCW with status = in_busy (1: a real word, 0: the input was idle) and the
// word at PCR is read out; both pointers then advance by one, wrapping
// around. Loading the Delay register (h_delay_we) sets PCR to 0 and PCW to
// the delay and clears every status bit, so the first delay word times read
// nothing and every word then leaves exactly 'delay' word times after it
// entered. out_word/out_en are registered on word_en; out_en is the status
// bit (Enable in the document: transmit only if set). With delay 0 the word
// written is passed straight to the output register. Delays up to
// 2**DLY_AW - 1 word times are possible.
//
// Timing: a word presented with word_en at word time t appears on out_word
// from the clock after word_en of word time t + delay.
//
// The RAM, status bit, PCW/PCR and the Delay register follow the document;
// the RAM depth, the clearing of status bits on reload and the delay-0
// bypass are this design's choices.
module delay_module #(
  parameter int unsigned WORD_W = iso_pkg::WORD_W,
  parameter int unsigned DLY_AW = iso_pkg::DLY_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              word_en,
  input  logic [WORD_W-1:0] in_word,
  input  logic              in_busy,
  input  logic              h_delay_we,
  input  logic [DLY_AW-1:0] h_delay,
  output logic [WORD_W-1:0] out_word,
  output logic              out_en,
  output logic [DLY_AW-1:0] delay_q
);
  localparam int unsigned DEPTH = 1 << DLY_AW;

  logic [WORD_W-1:0] ram [DEPTH];
  logic [DEPTH-1:0]  status;
  logic [DLY_AW-1:0] pcw, pcr;

  always_ff @(posedge clk) begin
    if (word_en) begin
      ram[pcw] <= in_word;
      out_word <= (pcw == pcr) ? in_word : ram[pcr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status  <= '0;
      pcw     <= '0;
      pcr     <= '0;
      delay_q <= '0;
      out_en  <= 1'b0;
    end else if (h_delay_we) begin
      status  <= '0;
      pcw     <= h_delay;
      pcr     <= '0;
      delay_q <= h_delay;
      out_en  <= 1'b0;
    end else if (word_en) begin
      status[pcw] <= in_busy;
      out_en      <= (pcw == pcr) ? in_busy : status[pcr];
      pcw         <= pcw + 1'b1;
      pcr         <= pcr + 1'b1;
    end
  end
endmodule
