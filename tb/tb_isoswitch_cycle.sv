// tb_isoswitch_cycle: the whole design at its default sizes running the
// two-band example table at its real band lengths, 2289 and 492 ticks
// (732.5 us and 157.4 us, a cycle of 2781 ticks = 889.92 us), for two full
// cycles at the nominal rate (one bit per clock, 1 Gb/s per port).
//
//   band 0: outport 2 <- inports 3,4 (inport 3 has priority), outport 4 <- inport 1
//   band 1: outports 1,3,4 <- inport 1 (multicast), outport 2 <- inport 3
//
// Inports 3 and 4 send back to back at the full line rate for the whole
// run. The workstation writes one word into the card every word time with
// the transmitter enabled, so inport 1 is also loaded at the full rate, and
// reads one word per word time from the card's reception buffer. Outport 3
// is delayed by 1000 word times (40 us).
// Checks:
//   * every band lasts exactly its expiration in ticks, every cycle 2781 ticks;
//   * throughput: in each complete band an outport fed by a saturated inport
//     sends exactly (E - 1) x 8 words, i.e. 8 words per tick on every tick
//     but the first (which is spent emptying the buffers of the old band);
//   * outport 2 carries only inport 3, in order: the priority source always
//     has data, so inport 4 never gets through and its buffer overflows;
//   * outport 3 repeats outport 4's band-1 words exactly 40 000 clocks later;
//   * the card receives on outport 1 every band-1 word of its own stream.
module tb_isoswitch_cycle;
  import iso_pkg::*;
  localparam int N = 4, W = 40, AW = 4, DW = 10, EN_W = 2 * N * N + 12;
  localparam int TICK = W * 8;
  localparam int E0 = 12'b100011110001, E1 = 12'b000111101100;
  localparam int DLY = 1000;
  logic clk = 0, rst_n = 0;
  logic [1:N-1] rx_sdata = '0, rx_svalid = '0, tx_sdata, tx_svalid;
  logic h_we = 0, h_bnd_we = 0, h_commit = 0, h_pending;
  logic [AW-1:0] h_addr = '0, h_bnd = '0;
  logic [EN_W-1:0] h_data = '0;
  logic [0:N-1] h_dly_we = '0;
  logic [DW-1:0] h_dly = '0;
  logic ws_wr = 0, ws_rd = 0, ws_irq;
  logic [2:0] ws_addr = '0;
  logic [W-1:0] ws_wdata = '0, ws_rdata;
  logic running, band_begin, cycle_begin;
  logic [AW-1:0] band_idx;
  logic [0:N-1] in_dropped, out_sent;
  logic [15:0] ws_rx_lost;
  int checks = 0, failures = 0;
  longint cyc = 0;

  isoswitch_top dut (.*);
  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W-1:0] mkword(input int src, input int seq);
    return {8'hC0 | 8'(src), 32'(seq)};
  endfunction

  // ---------------- full-rate serial sources on inports 3 and 4 ----------------
  bit src_on = 0;
  for (genvar i = 2; i < N; i++) begin : g_src
    logic [W-1:0] cur;
    int nb = 0, seq = 0;
    always @(negedge clk) begin
      if (nb == 0 && src_on) begin cur = mkword(i + 1, seq); seq++; nb = W; end
      if (nb != 0) begin
        rx_sdata[i] = cur[nb - 1]; rx_svalid[i] = 1'b1; nb--;
      end else rx_svalid[i] = 1'b0;
    end
  end

  // ---------------- serial monitors on outports 2..4 ----------------
  logic [W-1:0] rxq [N][$];
  longint       rxt [N][$];
  for (genvar j = 1; j < N; j++) begin : g_mon
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

  // ---------------- band and cycle starts ----------------
  longint band_t [$];
  int     band_i [$];
  longint cyc_t  [$];
  bit     in4_overflow = 0;
  always @(posedge clk) if (rst_n) begin
    if (band_begin) begin band_t.push_back(cyc); band_i.push_back(int'(band_idx)); end
    if (cycle_begin) cyc_t.push_back(cyc);
    if (in_dropped[3]) in4_overflow = 1;
  end

  // ---------------- workstation: feeds and drains the card ----------------
  bit ws_on = 0, ws_done = 0;
  int card_seq = 0, n_card_rx = 0, card_rx_last = -1;
  bit card_rx_ok = 1;
  initial begin
    wait (rst_n);
    @(negedge clk);
    ws_wr = 1; ws_addr = REG_CONTROL; ws_wdata = 40'h10; @(negedge clk); ws_wr = 0;
    forever begin
      if (ws_on) begin
        ws_wr = 1; ws_addr = REG_TXDATA; ws_wdata = mkword(1, card_seq); card_seq++;
      end
      @(negedge clk); ws_wr = 0;
      repeat (W / 2 - 1) @(negedge clk);
      ws_rd = 1; ws_addr = REG_RXDATA; @(negedge clk); ws_rd = 0;
      if (ws_rdata != '0) begin
        int seq;
        seq = int'(ws_rdata[31:0]);
        if (ws_rdata[39:32] != 8'hC1 || seq <= card_rx_last) card_rx_ok = 0;
        card_rx_last = seq;
        n_card_rx++;
      end
      repeat (W / 2 - 1) @(negedge clk);
    end
  end

  // count the words an outport started sending in each band window; words
  // granted in a band leave within 160 clocks of its end
  function automatic int words_in(input int j, input longint t0, input longint t1);
    int n = 0;
    foreach (rxt[j][k]) if (rxt[j][k] >= t0 + 160 && rxt[j][k] < t1 + 160) n++;
    return n;
  endfunction

  initial begin
    longint t4 [logic [W-1:0]];
    int last3, n3, nmatch;
    repeat (3) @(negedge clk);
    rst_n = 1;
    src_on = 1; ws_on = 1;
    h_dly_we = 4'b0010; h_dly = DW'(DLY); @(negedge clk); h_dly_we = '0;
    h_we = 1; h_addr = 0;
    h_data = 44'b0000_0011_0000_1000__0000_0010_0000_0000__100011110001; @(negedge clk);
    h_addr = 1;
    h_data = 44'b1000_0010_1000_1000__0000_0000_0000_0000__000111101100; @(negedge clk);
    h_we = 0;
    h_bnd_we = 1; h_bnd = 1; @(negedge clk); h_bnd_we = 0;
    h_commit = 1; @(negedge clk); h_commit = 0;

    // two full cycles, then let the delayed outport finish
    wait (cyc_t.size() == 3);
    ws_on = 0;
    repeat (DLY * W + 4 * TICK) @(negedge clk);

    // ---- band and cycle lengths ----
    chk(band_t.size() >= 5, $sformatf("%0d bands seen", band_t.size()));
    for (int k = 0; k + 1 < band_t.size(); k++)
      chk(band_t[k + 1] - band_t[k] == longint'((band_i[k] == 0) ? E0 : E1) * TICK,
          $sformatf("band %0d (line %0d) lasted %0d clocks", k, band_i[k], band_t[k + 1] - band_t[k]));
    for (int k = 0; k + 1 < cyc_t.size(); k++)
      chk(cyc_t[k + 1] - cyc_t[k] == longint'(E0 + E1) * TICK, "cycle length 2781 ticks");

    // ---- throughput in the complete bands (all but the first) ----
    for (int k = 1; k + 1 < band_t.size() && k < 4; k++) begin
      int e, n2, n4;
      e  = (band_i[k] == 0) ? E0 : E1;
      n2 = words_in(1, band_t[k], band_t[k + 1]);
      n4 = words_in(3, band_t[k], band_t[k + 1]);
      chk(n2 == (e - 1) * 8, $sformatf("outport 2 sent %0d words in line %0d, expected %0d", n2, band_i[k], (e - 1) * 8));
      chk(n4 == (e - 1) * 8, $sformatf("outport 4 sent %0d words in line %0d, expected %0d", n4, band_i[k], (e - 1) * 8));
    end

    // ---- outport 2: inport 3 only, in order ----
    begin
      int last, bad;
      last = -1; bad = 0;
      foreach (rxq[1][k]) begin
        if (rxq[1][k][39:32] != 8'hC3 || int'(rxq[1][k][31:0]) <= last) bad++;
        last = int'(rxq[1][k][31:0]);
      end
      chk(bad == 0, $sformatf("outport 2: %0d words not from inport 3 in order", bad));
      chk(in4_overflow, "inport 4 buffer overflowed (always loses to priority)");
    end
    foreach (rxq[j]) foreach (rxq[j][k]) if (rxq[j][k][39:32] == 8'hC4) begin
      chk(0, "an inport 4 word got through");
      break;
    end

    // ---- outport 3 = outport 4's band-1 words, DLY word times later ----
    foreach (rxq[3][k]) t4[rxq[3][k]] = rxt[3][k];
    n3 = rxq[2].size(); nmatch = 0; last3 = -1;
    foreach (rxq[2][k])
      if (t4.exists(rxq[2][k]) && rxt[2][k] - t4[rxq[2][k]] == DLY * W) nmatch++;
    chk(n3 == 2 * (E1 - 1) * 8, $sformatf("outport 3 got %0d words, expected %0d", n3, 2 * (E1 - 1) * 8));
    chk(nmatch == n3, $sformatf("%0d of %0d outport 3 words are outport 4's, 40000 clocks later", nmatch, n3));

    // ---- outport 1 through the card ----
    chk(card_rx_ok, "card received only its own words, in order");
    chk(n_card_rx == 2 * (E1 - 1) * 8, $sformatf("card received %0d words, expected %0d", n_card_rx, 2 * (E1 - 1) * 8));
    chk(ws_rx_lost == 0, "card lost no received word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
