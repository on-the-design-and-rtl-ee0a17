// serial_to_parallel: bit-serial line to WORD_W-bit words.
//
// The line carries sdata with a qualifier svalid (the electrical side of the
// optical receiver). Bits are shifted in MSB first while svalid is high;
// after WORD_W such bits the assembled word is presented on word with
// word_valid high for one clock. If svalid drops in the middle of a word, the
// partial word is discarded and the next valid bit starts a new word.
// Latency: word_valid rises on the clock after the word's last bit.
// Bit order, the qualifier and the partial-word rule are this design's
// choices; the conversion itself is the input line card's.
module serial_to_parallel #(
  parameter int unsigned WORD_W = iso_pkg::WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sdata,
  input  logic              svalid,
  output logic [WORD_W-1:0] word,
  output logic              word_valid
);
  localparam int unsigned CW = $clog2(WORD_W);

  logic [WORD_W-1:0] shreg;
  logic [CW-1:0]     cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      cnt        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (svalid) begin
        shreg <= {shreg[WORD_W-2:0], sdata};
        if (32'(cnt) == WORD_W - 1) begin
          cnt        <= '0;
          word       <= {shreg[WORD_W-2:0], sdata};
          word_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else begin
        cnt <= '0;
      end
    end
  end
endmodule
