// word_fifo: synchronous first-in first-out word buffer.
//
// Used as the input buffer of each input line card and as the transmission
// and reception buffers of the interface card. dout shows the oldest word
// whenever empty is low (first-word fall-through); pop removes it on the
// clock edge. push stores din unless the buffer is full and no word leaves in
// the same clock, in which case the word is dropped and overflow pulses.
// flush empties the buffer in one clock (it wins over push and pop).
// count gives the number of stored words. The depth is this design's choice.
module word_fifo #(
  parameter int unsigned WIDTH = iso_pkg::WORD_W,
  parameter int unsigned DEPTH = iso_pkg::IN_BUF_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push && !flush) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (flush) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= CW'(32'(count) + (do_push ? 1 : 0) - (do_pop ? 1 : 0));
    end
  end

  // A pop on an empty buffer is a caller error.
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty && !flush))
    else $error("word_fifo: pop while empty");
endmodule
