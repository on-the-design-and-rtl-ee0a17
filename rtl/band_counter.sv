// band_counter: the Counter register of the control unit.
//
// When a new configuration is fetched (load, on a tick), the counter takes
// the entry's expiration value. On every later tick it counts down by one.
// expire is high while the count is 1 or 0, so the control unit fetches the
// next configuration on the tick that ends the band: a band whose expiration
// is E lasts E ticks (E = 0 is treated as one tick). elapsed reports how many
// ticks of the current band have gone by. Fetch-on-load and count-down
// follow the document; exact off-by-one timing and the E = 0 rule are this
// design's choices.
module band_counter #(
  parameter int unsigned EXP_W = iso_pkg::EXP_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick_en,
  input  logic             load,
  input  logic [EXP_W-1:0] load_value,
  output logic [EXP_W-1:0] count,
  output logic [EXP_W-1:0] elapsed,
  output logic             expire
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      elapsed <= '0;
    end else if (tick_en) begin
      if (load) begin
        count   <= load_value;
        elapsed <= '0;
      end else begin
        if (count != '0) count <= count - 1'b1;
        elapsed <= elapsed + 1'b1;
      end
    end
  end

  assign expire = (count <= EXP_W'(1));
endmodule
