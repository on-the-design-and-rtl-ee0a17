// iso_lfsr: 16-bit Galois LFSR used as the arbitration's random source.
//
// Advances one step when step is high. Taps x^16+x^14+x^13+x^11+1 (maximal
// length). The seed is loaded at reset and must be non-zero. The document
// asks for a random choice among contending inputs; the generator is this
// design's choice.
module iso_lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [15:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    value <= SEED;
    else if (step) value <= {1'b0, value[15:1]} ^ (value[0] ? 16'hB400 : 16'h0000);
  end
endmodule
