// switching_fabric: complete N_IN x N_OUT word crossbar.
//
// One N_IN-to-1 multiplexer per outport, each connected to every inport.
// On every word time (word_en) outport j registers the word of inport
// sel[j] and marks it valid when en[j] is set and that inport offered a
// valid word; otherwise out_valid[j] is 0. A word crosses in one word time
// (40 ns at the nominal rate). The multiplexer-per-outport structure and the
// one-word crossing time follow the document; the valid flag travelling with
// the word is this design's choice.
module switching_fabric #(
  parameter int unsigned N_IN   = iso_pkg::N_PORTS,
  parameter int unsigned N_OUT  = iso_pkg::N_PORTS,
  parameter int unsigned WORD_W = iso_pkg::WORD_W,
  localparam int unsigned SW    = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         word_en,
  input  logic [0:N_IN-1][WORD_W-1:0]  in_word,
  input  logic [0:N_IN-1]              in_valid,
  input  logic [0:N_OUT-1][SW-1:0]     sel,
  input  logic [0:N_OUT-1]             en,
  output logic [0:N_OUT-1][WORD_W-1:0] out_word,
  output logic [0:N_OUT-1]             out_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_word  <= '0;
      out_valid <= '0;
    end else if (word_en) begin
      for (int j = 0; j < N_OUT; j++) begin
        out_word[j]  <= in_word[sel[j]];
        out_valid[j] <= en[j] && in_valid[sel[j]];
      end
    end
  end
endmodule
