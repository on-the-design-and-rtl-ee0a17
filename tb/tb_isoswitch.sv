// tb_isoswitch: the switch end to end on its serial lines, at the default
// sizes (4x4 ports, 40-bit words, 8 words per tick, 1 bit per clock).
//
// The table holds the two example configuration lines of the design
// description, band 0 lasting 2 ticks and band 1 4 ticks:
//   band 0: outport 2 <- inports 3,4 (inport 3 has priority), outport 4 <- inport 1
//   band 1: outports 1,3,4 <- inport 1 (multicast), outport 2 <- inport 3
// Each word sent carries its source inport and a sequence number. Checks:
//   * band 0: inport 1's 8 words leave on outport 4 only, in order, with the
//     programmed delay; inport 3 (priority) gets outport 2 for the one
//     tick in which grants are given; inport 4's words, which lose to it,
//     are all discarded at the end of the band (RDMA+);
//   * band 1: inport 1's words leave on outports 1, 3 and 4;
//   * selection latency: a word is switched within one tick of arrival;
//   * a new table loaded while running takes over only at the cycle end.
module tb_isoswitch;
  localparam int N = 4, W = 40, AW = 4, EW = 12, DW = 10, EN_W = 2 * N * N + EW;
  localparam int TICK = W * 8;
  logic clk = 0, rst_n = 0;
  logic [0:N-1] rx_sdata = '0, rx_svalid = '0, tx_sdata, tx_svalid;
  logic h_we = 0, h_bnd_we = 0, h_commit = 0, h_pending;
  logic [AW-1:0] h_addr = '0, h_bnd = '0;
  logic [EN_W-1:0] h_data = '0;
  logic [0:N-1] h_dly_we = '0;
  logic [DW-1:0] h_dly = '0;
  logic word_en, tick_en, running, bank, band_begin, cycle_begin, band_end;
  logic [AW-1:0] band_idx;
  logic [0:N-1] in_dropped, out_sent;
  int checks = 0, failures = 0;
  longint cyc = 0;

  isoswitch dut (.*);
  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- serial sources: one queue of words per inport ----
  logic [W-1:0] txq [N][$];
  longint       t_last_bit [N][$];   // clock at which each word's last bit was driven
  for (genvar i = 0; i < N; i++) begin : g_src
    logic [W-1:0] cur;
    int nb = 0;
    always @(negedge clk) begin
      if (nb == 0 && txq[i].size() != 0) begin cur = txq[i].pop_front(); nb = W; end
      if (nb != 0) begin
        rx_sdata[i] = cur[nb - 1]; rx_svalid[i] = 1'b1; nb--;
        if (nb == 0) t_last_bit[i].push_back(cyc);
      end else rx_svalid[i] = 1'b0;
    end
  end

  // ---- serial monitors: words and first-bit clocks per outport ----
  logic [W-1:0] rxq [N][$];
  longint       rxt [N][$];
  for (genvar j = 0; j < N; j++) begin : g_mon
    logic [W-1:0] sh;
    int nb = 0;
    longint t0;
    always @(negedge clk) if (rst_n) begin
      if (tx_svalid[j]) begin
        if (nb == 0) t0 = cyc;
        sh = {sh[W-2:0], tx_sdata[j]}; nb++;
        if (nb == W) begin rxq[j].push_back(sh); rxt[j].push_back(t0); nb = 0; end
      end
    end
  end

  function automatic logic [W-1:0] mkword(input int src, input int seq);
    return {8'hC0 | 8'(src), 16'(seq), 16'hBEEF};
  endfunction

  task automatic host_line(input int a, input logic [EN_W-1:0] d);
    h_we = 1; h_addr = AW'(a); h_data = d; @(negedge clk); h_we = 0;
  endtask

  task automatic wait_band(input int idx);
    do @(negedge clk); while (!(band_begin && band_idx == AW'(idx)));
  endtask

  task automatic clear_mon();
    for (int j = 0; j < N; j++) begin rxq[j].delete(); rxt[j].delete(); end
    for (int i = 0; i < N; i++) t_last_bit[i].delete();
  endtask

  int ndrop_in;
  always @(posedge clk) if (rst_n) for (int i = 0; i < N; i++) if (in_dropped[i]) ndrop_in++;

  initial begin
    int nflush_words;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ndrop_in = 0;
    // delays: outport 4 delayed by 5 word times, others 0
    h_dly_we = 4'b0001; h_dly = 10'd5; @(negedge clk); h_dly_we = '0;
    host_line(0, {16'b0000_0011_0000_1000, 16'b0000_0010_0000_0000, 12'd2});
    host_line(1, {16'b1000_0010_1000_1000, 16'b0000_0000_0000_0000, 12'd4});
    h_bnd_we = 1; h_bnd = 1; @(negedge clk); h_bnd_we = 0;
    h_commit = 1; @(negedge clk); h_commit = 0;

    // ---- band 0 of the second cycle ----
    wait_band(0);
    wait_band(1);
    wait_band(0);
    clear_mon();
    for (int s = 0; s < 8; s++) begin
      txq[0].push_back(mkword(1, s));
      txq[2].push_back(mkword(3, s));
      txq[3].push_back(mkword(4, s));
    end
    wait_band(1);
    @(negedge clk);
    chk(!dut.g_in[3].u_ilc.busy, "inport 4 buffer emptied at band end");
    repeat (8 * W) @(negedge clk);
    chk(rxq[0].size() == 0 && rxq[2].size() == 0, "band 0: nothing on outports 1 and 3");
    chk(rxq[3].size() == 8, $sformatf("band 0: 8 words on outport 4 (%0d)", rxq[3].size()));
    for (int s = 0; s < rxq[3].size(); s++) chk(rxq[3][s] == mkword(1, s), "outport 4 word order");
    chk(rxq[1].size() == 8, $sformatf("band 0: 8 words on outport 2 (%0d)", rxq[1].size()));
    for (int s = 0; s < rxq[1].size(); s++) chk(rxq[1][s] == mkword(3, s), "outport 2 carries priority inport 3");
    // latency: outport 2 (delay 0) first word vs inport 3 first word arrival
    if (rxq[1].size() != 0 && t_last_bit[2].size() != 0) begin
      longint lat;
      lat = rxt[1][0] - t_last_bit[2][0];
      chk(lat <= TICK + 2 * W + 4, $sformatf("switched within one tick (latency %0d clocks)", lat));
      if (rxq[3].size() != 0) chk(rxt[3][0] - t_last_bit[0][0] >= 5 * W, "outport 4 delayed by 5 words");
    end

    // ---- band 1: multicast ----
    clear_mon();
    for (int s = 0; s < 8; s++) txq[0].push_back(mkword(1, 100 + s));
    wait_band(0);
    repeat (8 * W) @(negedge clk);  // let the delayed outport finish
    for (int j = 0; j < N; j++) begin
      if (j == 1) chk(rxq[j].size() == 0, "band 1: outport 2 idle");
      else begin
        chk(rxq[j].size() == 8, $sformatf("band 1: multicast to outport %0d (%0d)", j + 1, rxq[j].size()));
        for (int s = 0; s < rxq[j].size(); s++) chk(rxq[j][s] == mkword(1, 100 + s), "multicast word");
      end
    end

    // ---- reconfiguration: one band, inport 2 -> outport 1 ----
    host_line(0, {16'b0100_0000_0000_0000, 16'b0, 12'd3});
    h_bnd_we = 1; h_bnd = 0; @(negedge clk); h_bnd_we = 0;
    h_commit = 1; @(negedge clk); h_commit = 0;
    chk(h_pending && bank == 1, "new table pending while the old one runs");
    wait_band(1);
    chk(bank == 1, "old table still in use mid-cycle");
    wait_band(0);
    chk(bank == 0 && !h_pending, "new table from the cycle start");
    clear_mon();
    for (int s = 0; s < 4; s++) txq[1].push_back(mkword(2, 200 + s));
    repeat (3 * TICK) @(negedge clk);
    chk(rxq[0].size() == 4, $sformatf("new table: inport 2 reaches outport 1 (%0d)", rxq[0].size()));
    for (int s = 0; s < rxq[0].size(); s++) chk(rxq[0][s] == mkword(2, 200 + s), "new table words");
    chk(ndrop_in == 0, "no buffer overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
