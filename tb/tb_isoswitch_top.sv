// tb_isoswitch_top: the whole design end to end at its default sizes (no
// parameter overrides): a 4x4 Isoswitch with a workstation interface card on
// port 1, serial traffic sources on inports 2-4 and serial monitors on
// outports 2-4. One bit per clock, so a word time is 40 clocks and a tick 320.
//
// Table A (4 bands, cycle of 4+3+2+12 ticks):
//   band 0: outport 1 <- inports 2,3 (contention, random pick),
//           outports 2,3 <- inport 1 (card, multicast), outport 4 <- inport 4
//   band 1: outport 1 <- inports 2,4 with inport 4 priority, outport 4 <- inport 3
//   band 2: outport 1 <- inport 3
//   band 3: nothing connected; inport 2 floods 70 words into its 64-word
//           buffer (6 lost to overflow, the rest discarded at band end)
// Outport 2 is delayed by 3 word times. While table A runs, table B (one
// band, outport 1 <- inport 4) is loaded and committed; it must take over at
// the end of the cycle.
// Every word carries its source inport, the band it was sent in and a
// sequence number. Checks: each outport receives exactly the expected words
// in order (card words on outports 2 and 3, inport 4 then inport 3 on
// outport 4; on outport 1, read back through the card, 16 words from
// inport 2, 12 from inport 3 and 16 from inport 4, each from a band in which
// that inport was connected, in order per inport); the card bursts at full
// rate; the card sees band and cycle events and raises its interrupt.
// Mechanisms counted (each must happen at least once): band change, cycle
// start, table swap, priority grant, random contention pick, multicast grant,
// RDMA+ discard at band end, input-buffer overflow, delayed output, card
// burst, card interrupt.
module tb_isoswitch_top;
  import iso_pkg::*;
  localparam int N = 4, W = 40, AW = 4, DW = 10, EN_W = 2 * N * N + 12;
  localparam int TICK = W * 8;
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

  // ---------------- mechanism counters ----------------
  typedef enum int {M_BAND, M_CYCLE, M_SWAP, M_PRIO, M_RAND, M_MCAST, M_DISCARD,
                    M_OVERFLOW, M_DELAY, M_BURST, M_IRQ, M_NUM} mech_e;
  int mech [M_NUM];
  string mname [M_NUM] = '{"band change", "cycle start", "table swap", "priority grant",
                           "random contention pick", "multicast grant", "RDMA+ discard",
                           "input overflow", "delayed output", "card burst", "card interrupt"};
  logic bank_q, run_q;
  always @(posedge clk) if (rst_n) begin
    if (band_begin) mech[M_BAND]++;
    if (cycle_begin) mech[M_CYCLE]++;
    bank_q <= dut.bank;
    run_q  <= dut.u_switch.u_cu.running;
    if (run_q && bank_q != dut.bank) mech[M_SWAP]++;
    if (dut.u_switch.tick_en) begin
      for (int j = 0; j < N; j++) begin
        int npri, ncand;
        npri = $countones(dut.u_switch.u_cu.pri[j] & dut.u_switch.u_cu.busy_eff);
        ncand = $countones(dut.u_switch.u_cu.con[j] & dut.u_switch.u_cu.busy_eff);
        if (npri > 0 && ncand > 0) mech[M_PRIO]++;
        if (npri == 0 && ncand > 1) mech[M_RAND]++;
      end
      for (int i = 0; i < N; i++) begin
        int ng;
        ng = 0;
        for (int j = 0; j < N; j++) ng += int'(dut.u_switch.u_cu.grant_c[j][i]);
        if (ng > 1) mech[M_MCAST]++;
      end
    end
    if (dut.band_end && dut.u_switch.u_cu.busy != '0) mech[M_DISCARD]++;
    if (in_dropped != '0) mech[M_OVERFLOW]++;
    if (out_sent[1]) mech[M_DELAY]++;
    if (dut.card_burst) mech[M_BURST]++;
  end
  logic irq_q;
  always @(posedge clk) if (rst_n) begin
    irq_q <= ws_irq;
    if (ws_irq && !irq_q) mech[M_IRQ]++;
  end

  // ---------------- serial sources on inports 2..4 ----------------
  logic [W-1:0] txq [N][$];
  for (genvar i = 1; i < N; i++) begin : g_src
    logic [W-1:0] cur;
    int nb = 0;
    always @(negedge clk) begin
      if (nb == 0 && txq[i].size() != 0) begin cur = txq[i].pop_front(); nb = W; end
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

  function automatic logic [W-1:0] mkword(input int src, input int band, input int seq);
    return {8'hC0 | 8'(src), 8'(band), 16'(seq), 8'h5A};
  endfunction

  // ---------------- host helpers ----------------
  task automatic host_line(input int a, input logic [EN_W-1:0] d);
    h_we = 1; h_addr = AW'(a); h_data = d; @(negedge clk); h_we = 0;
  endtask
  task automatic ws_write(input if_reg_e a, input logic [W-1:0] d);
    ws_wr = 1; ws_addr = a; ws_wdata = d; @(negedge clk); ws_wr = 0;
  endtask
  task automatic ws_read(input if_reg_e a, output logic [W-1:0] d);
    ws_rd = 1; ws_addr = a; @(negedge clk); ws_rd = 0; d = ws_rdata;
  endtask
  task automatic wait_band(input int idx);
    do @(negedge clk); while (!(band_begin && band_idx == AW'(idx)));
  endtask

  // connections of table A / B for the outport-1 check: bit i = inport i+1
  function automatic bit allowed_on_out1(input int src, input int band);
    case (band)
      0: return src == 2 || src == 3;
      1: return src == 2 || src == 4;
      2: return src == 3;
      8: return src == 4;      // table B
      default: return 0;
    endcase
  endfunction

  initial begin
    logic [W-1:0] d, st;
    int n_from [N + 1];
    int last_seq [N + 1];
    int bursts_before;
    foreach (mech[k]) mech[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- configuration ----
    h_dly_we = 4'b0100; h_dly = 10'd3; @(negedge clk); h_dly_we = '0;
    host_line(0, {16'b0110_1000_1000_0001, 16'b0, 12'd4});
    host_line(1, {16'b0101_0000_0000_0010, 16'b0001_0000_0000_0000, 12'd3});
    host_line(2, {16'b0010_0000_0000_0000, 16'b0, 12'd2});
    host_line(3, {16'b0, 16'b0, 12'd12});
    h_bnd_we = 1; h_bnd = 3; @(negedge clk); h_bnd_we = 0;
    h_commit = 1; @(negedge clk); h_commit = 0;
    // card: all events, interrupts on, transmitter off; 8 words queued
    ws_write(REG_CONTROL, 40'h0F);
    for (int s = 0; s < 8; s++) ws_write(REG_TXDATA, mkword(1, 0, s));

    // ---- cycle 1, table A ----
    wait_band(0);
    @(negedge clk);
    chk(ws_irq, "card interrupt on cycle start");
    ws_read(REG_STATUS, st);
    chk(st[EV_CYCLE] && st[EV_BAND], "card saw cycle and band start");
    ws_read(REG_BAND, d);
    chk(d == 0, "card band register");
    ws_write(REG_CONTROL, 40'h1F);             // transmit now
    for (int s = 0; s < 8; s++) begin
      txq[1].push_back(mkword(2, 0, s));
      txq[2].push_back(mkword(3, 0, s));
      txq[3].push_back(mkword(4, 0, s));
    end
    repeat (TICK) @(negedge clk);
    ws_write(REG_CONTROL, 40'h0F);             // transmitter off again
    wait_band(1);
    for (int s = 0; s < 8; s++) begin
      txq[1].push_back(mkword(2, 1, 100 + s));
      txq[3].push_back(mkword(4, 1, 100 + s));
      txq[2].push_back(mkword(3, 1, 100 + s));
    end
    wait_band(2);
    for (int s = 0; s < 4; s++) txq[2].push_back(mkword(3, 2, 200 + s));
    wait_band(3);
    for (int s = 0; s < 70; s++) txq[1].push_back(mkword(2, 3, 300 + s));
    // table B goes into the idle RAM while band 3 runs
    host_line(0, {16'b0001_0000_0000_0000, 16'b0, 12'd3});
    h_bnd_we = 1; h_bnd = 0; @(negedge clk); h_bnd_we = 0;
    h_commit = 1; @(negedge clk); h_commit = 0;

    // ---- cycle 2, table B ----
    wait_band(0);
    chk(dut.bank == 0 && !h_pending, "table B in use from the cycle start");
    for (int s = 0; s < 8; s++) txq[3].push_back(mkword(4, 8, 400 + s));
    repeat (4 * TICK) @(negedge clk);

    // ---- outports 2, 3: card words (multicast) ----
    for (int j = 1; j <= 2; j++) begin
      chk(rxq[j].size() == 8, $sformatf("outport %0d got %0d card words", j + 1, rxq[j].size()));
      for (int s = 0; s < rxq[j].size(); s++) chk(rxq[j][s] == mkword(1, 0, s), "card word");
    end
    if (rxq[1].size() != 0 && rxq[2].size() != 0)
      chk(rxt[1][0] - rxt[2][0] == 3 * W, "outport 2 three word times behind outport 3");
    if (rxq[2].size() == 8)
      chk(rxt[2][7] - rxt[2][0] == 7 * W, "card burst crosses at full line rate");
    // ---- outport 4 ----
    chk(rxq[3].size() == 16, $sformatf("outport 4 got %0d words", rxq[3].size()));
    for (int s = 0; s < rxq[3].size(); s++)
      chk(rxq[3][s] == ((s < 8) ? mkword(4, 0, s) : mkword(3, 1, 100 + s - 8)), "outport 4 word");
    // ---- outport 1 through the card's reception buffer ----
    foreach (n_from[k]) begin n_from[k] = 0; last_seq[k] = -1; end
    forever begin
      ws_read(REG_STATUS, st);
      if (st[N_EV + 7 +: 7] == 0) break;
      ws_read(REG_RXDATA, d);
      begin
        int src, band, seq;
        src = int'(d[39:32] & 8'h0F); band = int'(d[31:24]); seq = int'(d[23:8]);
        chk(d[39:36] == 4'hC && src >= 1 && src <= 4, "outport 1 word well formed");
        chk(allowed_on_out1(src, band), $sformatf("inport %0d allowed on outport 1 in band %0d", src, band));
        chk(seq > last_seq[src], "order per inport");
        last_seq[src] = seq;
        n_from[src]++;
      end
    end
    chk(n_from[2] == 16 && n_from[3] == 12 && n_from[4] == 16 && n_from[1] == 0,
        $sformatf("outport 1 counts %0d %0d %0d", n_from[2], n_from[3], n_from[4]));
    chk(ws_rx_lost == 0, "card lost nothing");

    foreach (mech[k]) begin
      $display("mechanism %-24s %0d", mname[k], mech[k]);
      chk(mech[k] > 0, {"mechanism happened: ", mname[k]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
