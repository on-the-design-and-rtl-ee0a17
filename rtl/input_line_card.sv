// input_line_card: one inport of the Isoswitch.
//
// The serial line (after optical/electronic conversion, which is outside this
// RTL) is converted into WORD_W-bit words, which are stored in the input
// buffer. busy tells the control unit that the buffer will still hold a word
// after the current clock edge (a last word leaving on this very edge does
// not count, so a drained inport does not keep its outport for another
// tick). While the
// inport is granted to at least one outport, one word leaves on each word
// time: word/word_valid show the buffer head, and it is removed on the
// word_en edge. flush (the end of a band) discards everything buffered, as
// RDMA+ keeps contending frames only up to the end of their band.
// dropped pulses when a word arrives at a full buffer and is lost.
// Conversion then buffering follows the document; depth, flush and drop
// behaviour are this design's choices.
module input_line_card #(
  parameter int unsigned WORD_W    = iso_pkg::WORD_W,
  parameter int unsigned BUF_DEPTH = iso_pkg::IN_BUF_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sdata,
  input  logic              svalid,
  input  logic              word_en,
  input  logic              granted,
  input  logic              flush,
  output logic [WORD_W-1:0] word,
  output logic              word_valid,
  output logic              busy,
  output logic              dropped,
  output logic [$clog2(BUF_DEPTH+1)-1:0] level
);
  logic [WORD_W-1:0] rx_word;
  logic              rx_valid;
  logic              empty, full, pop;

  serial_to_parallel #(.WORD_W(WORD_W)) u_s2p (
    .clk, .rst_n, .sdata, .svalid, .word(rx_word), .word_valid(rx_valid)
  );

  word_fifo #(.WIDTH(WORD_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .flush,
    .push(rx_valid), .din(rx_word),
    .pop,
    .dout(word), .empty, .full, .count(level), .overflow(dropped)
  );

  assign pop        = word_en && granted && !empty;
  assign busy       = (32'(level) > 1) || (!empty && !pop);
  assign word_valid = !empty;
endmodule
