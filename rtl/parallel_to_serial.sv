// parallel_to_serial: WORD_W-bit words to the bit-serial line.
//
// A one-clock load pulse captures word; its bits then leave MSB first on
// sdata, one per clock, starting on the clock after the load, with svalid
// high for exactly WORD_W clocks. Loading every WORD_W clocks gives an
// unbroken stream. A load while a word is still leaving replaces it (the
// callers never do this). MSB-first order and the svalid qualifier are this
// design's choices, matched by serial_to_parallel.
module parallel_to_serial #(
  parameter int unsigned WORD_W = iso_pkg::WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [WORD_W-1:0] word,
  output logic              sdata,
  output logic              svalid
);
  localparam int unsigned CW = $clog2(WORD_W + 1);

  logic [WORD_W-1:0] shreg;
  logic [CW-1:0]     left;   // bits still to send

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
    end else if (load) begin
      shreg <= word;
      left  <= CW'(WORD_W);
    end else if (left != '0) begin
      shreg <= {shreg[WORD_W-2:0], 1'b0};
      left  <= left - 1'b1;
    end
  end

  assign sdata  = shreg[WORD_W-1];
  assign svalid = (left != '0);
endmodule
