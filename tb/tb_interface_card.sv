// tb_interface_card: the host writes words into the transmission buffer;
// nothing may leave before transmit is enabled and before 8 words are
// there; then bursts of 8 words must leave back to back at the line rate
// (8 words in 8 word times). The card's transmitter is looped back to its
// receiver, so the host must read the same words back from the reception
// buffer. Band/cycle signals and received words must show in the status
// register and raise the interrupt when enabled; the band register must
// show the switch's band index.
module tb_interface_card;
  import iso_pkg::*;
  localparam int W = 40;
  logic clk = 0, rst_n = 0, word_en;
  logic h_wr = 0, h_rd = 0;
  logic [2:0] h_addr = '0;
  logic [W-1:0] h_wdata = '0, h_rdata;
  logic irq, tx_sdata, tx_svalid, sw_cycle_begin = 0, sw_band_begin = 0, tx_burst_start;
  logic [3:0] sw_band_idx = 4'd9;
  logic [15:0] rx_lost;
  int checks = 0, failures = 0, wcnt = 0, bursts = 0;
  longint cyc = 0, first_valid = -1, last_valid = -1;
  int nvalid = 0;

  interface_card #(.WORD_W(W)) dut (
    .clk, .rst_n, .word_en, .h_wr, .h_rd, .h_addr, .h_wdata, .h_rdata, .irq,
    .tx_sdata, .tx_svalid, .rx_sdata(tx_sdata), .rx_svalid(tx_svalid),
    .sw_cycle_begin, .sw_band_begin, .sw_band_idx, .tx_burst_start, .rx_lost
  );
  always #1 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    wcnt <= (wcnt == W - 1) ? 0 : wcnt + 1;
    if (rst_n && tx_burst_start) bursts++;
    if (rst_n && tx_svalid) begin
      if (first_valid < 0) first_valid = cyc;
      last_valid = cyc;
      nvalid++;
    end
  end
  assign word_en = (wcnt == W - 1);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input if_reg_e a, input logic [W-1:0] d);
    h_wr = 1; h_addr = a; h_wdata = d; @(negedge clk); h_wr = 0;
  endtask
  task automatic rd(input if_reg_e a, output logic [W-1:0] d);
    h_rd = 1; h_addr = a; @(negedge clk); h_rd = 0; d = h_rdata;
  endtask

  initial begin
    logic [W-1:0] words[16], d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) words[i] = {$urandom, $urandom};
    for (int i = 0; i < 7; i++) wr(REG_TXDATA, words[i]);
    wr(REG_CONTROL, 40'h1F);                       // all events, irq, tx enable
    repeat (200) @(negedge clk);
    chk(nvalid == 0, "no burst with 7 words");
    wr(REG_TXDATA, words[7]);
    repeat (20 * W) @(negedge clk);
    chk(bursts == 1, $sformatf("one burst of 8 (got %0d)", bursts));
    chk(nvalid == 8 * W, $sformatf("8 words on the line (%0d bits)", nvalid));
    chk(last_valid - first_valid + 1 == 8 * W, "burst at full line rate");
    chk(irq, "receive raises the interrupt");
    rd(REG_STATUS, d);
    chk(d[EV_RX] && 32'(d[N_EV +: 7]) == 0 && 32'(d[N_EV + 7 +: 7]) == 8,
        $sformatf("status: rx event, tx level 0, rx level 8 (%h)", d));
    @(negedge clk);
    chk(!irq, "status read clears the interrupt");
    for (int i = 0; i < 8; i++) begin
      rd(REG_RXDATA, d);
      chk(d == words[i], $sformatf("loop-back word %0d", i));
    end
    // eight more words make a second burst
    for (int i = 8; i < 16; i++) wr(REG_TXDATA, words[i]);
    repeat (20 * W) @(negedge clk);
    chk(bursts == 2, "second burst");
    for (int i = 8; i < 16; i++) begin
      rd(REG_RXDATA, d);
      chk(d == words[i], $sformatf("loop-back word %0d", i));
    end
    rd(REG_STATUS, d);
    sw_band_begin = 1; @(negedge clk); sw_band_begin = 0;
    sw_cycle_begin = 1; @(negedge clk); sw_cycle_begin = 0;
    chk(irq, "band signal interrupt");
    rd(REG_STATUS, d);
    chk(d[EV_BAND] && d[EV_CYCLE], "band and cycle events");
    rd(REG_BAND, d);
    chk(d == 40'd9, "band register");
    wr(REG_CONTROL, 40'h07);                       // polling mode
    sw_band_begin = 1; @(negedge clk); sw_band_begin = 0;
    chk(!irq, "no interrupt in polling mode");
    rd(REG_STATUS, d);
    chk(d[EV_BAND], "event seen by polling");
    chk(rx_lost == 0, "nothing lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
