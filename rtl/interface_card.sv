// interface_card: network interface between a workstation and an Isoswitch
// port.
//
// Transmit path: the host writes words into the transmission buffer; once
// the buffer holds at least BURST words and the host has set the
// transmit-enable control bit, the transmitter sends BURST words back to
// back on the serial line at the full line rate, one per word time, and
// starts the next burst straight after if the rule still holds.
// Receive path: the receiver turns the serial line from the switch into
// words and stores them in the reception buffer, where the host reads them.
// Signal detector: cycle-begin and band-begin signals from the switch and
// each received word raise status bits and, if enabled, an interrupt.
//
// Host port: a simple synchronous register port (h_wr, h_rd, h_addr,
// h_wdata; h_rdata is valid on the clock after h_rd). Registers (iso_pkg
// if_reg_e): TXDATA write, RXDATA read (pops; reads 0 if empty), STATUS read
// {rx level, tx level, event bits} (clears the event bits), CONTROL
// read/write, BAND read (switch's current band). A write to TXDATA with the
// buffer full is lost; a received word that finds the reception buffer
// full is lost and counted in rx_lost.
//
// Buffers, transmitter, receiver, signal detector, the 8-word start rule
// and the status/control registers follow the document. The register map,
// the host port (which stands in for the workstation bus) and the burst
// behaviour are this design's choices.
module interface_card #(
  parameter int unsigned WORD_W    = iso_pkg::WORD_W,
  parameter int unsigned BUF_DEPTH = iso_pkg::IF_BUF_DEPTH,
  parameter int unsigned BURST     = iso_pkg::TX_BURST,
  parameter int unsigned CT_AW     = iso_pkg::CT_AW,
  localparam int unsigned LW       = $clog2(BUF_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              word_en,
  // host register port
  input  logic              h_wr,
  input  logic              h_rd,
  input  logic [2:0]        h_addr,
  input  logic [WORD_W-1:0] h_wdata,
  output logic [WORD_W-1:0] h_rdata,
  output logic              irq,
  // network side
  output logic              tx_sdata,
  output logic              tx_svalid,
  input  logic              rx_sdata,
  input  logic              rx_svalid,
  input  logic              sw_cycle_begin,
  input  logic              sw_band_begin,
  input  logic [CT_AW-1:0]  sw_band_idx,
  // activity
  output logic              tx_burst_start,
  output logic [15:0]       rx_lost
);
  typedef enum logic {TX_IDLE, TX_SEND} tx_state_e;

  tx_state_e                  tx_state;
  logic [$clog2(BURST+1)-1:0] tx_left;
  logic [WORD_W-1:0]          txb_dout, rxb_dout, rx_word;
  logic                       txb_empty, txb_full, rxb_empty, rxb_full, rx_valid;
  logic [LW-1:0]              txb_level, rxb_level;
  logic                       tx_pop, tx_load, rxb_ovf, rx_pop;
  logic [4:0]                 control;
  logic [iso_pkg::N_EV-1:0]            status;
  logic                       status_rd;

  // ---------------- transmit path ----------------
  word_fifo #(.WIDTH(WORD_W), .DEPTH(BUF_DEPTH)) u_txbuf (
    .clk, .rst_n, .flush(1'b0),
    .push(h_wr && h_addr == iso_pkg::REG_TXDATA), .din(h_wdata),
    .pop(tx_pop), .dout(txb_dout), .empty(txb_empty), .full(txb_full),
    .count(txb_level), .overflow()
  );

  assign tx_burst_start = word_en && (tx_state == TX_IDLE || tx_left == '0) && control[iso_pkg::CTL_TX_EN]
                          && 32'(txb_level) >= BURST;
  assign tx_pop = word_en && (tx_burst_start || (tx_state == TX_SEND && tx_left != '0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= TX_IDLE;
      tx_left  <= '0;
      tx_load  <= 1'b0;
    end else begin
      tx_load <= tx_pop;
      if (tx_burst_start) begin
        tx_state <= TX_SEND;
        tx_left  <= ($bits(tx_left))'(BURST - 1);
      end else if (tx_state == TX_SEND && word_en) begin
        if (tx_left == '0) tx_state <= TX_IDLE;
        else               tx_left  <= tx_left - 1'b1;
      end
    end
  end

  // Word popped on word_en is held in the serialiser from the next clock.
  logic [WORD_W-1:0] tx_word_q;
  always_ff @(posedge clk) if (tx_pop) tx_word_q <= txb_dout;

  parallel_to_serial #(.WORD_W(WORD_W)) u_tx (
    .clk, .rst_n, .load(tx_load), .word(tx_word_q), .sdata(tx_sdata), .svalid(tx_svalid)
  );

  // ---------------- receive path ----------------
  serial_to_parallel #(.WORD_W(WORD_W)) u_rx (
    .clk, .rst_n, .sdata(rx_sdata), .svalid(rx_svalid), .word(rx_word), .word_valid(rx_valid)
  );

  assign rx_pop = h_rd && h_addr == iso_pkg::REG_RXDATA && !rxb_empty;

  word_fifo #(.WIDTH(WORD_W), .DEPTH(BUF_DEPTH)) u_rxbuf (
    .clk, .rst_n, .flush(1'b0),
    .push(rx_valid), .din(rx_word),
    .pop(rx_pop), .dout(rxb_dout), .empty(rxb_empty), .full(rxb_full),
    .count(rxb_level), .overflow(rxb_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rx_lost <= '0;
    else if (rxb_ovf) rx_lost <= rx_lost + 1'b1;
  end

  // ---------------- signals and registers ----------------
  assign status_rd = h_rd && h_addr == iso_pkg::REG_STATUS;

  signal_detector u_sig (
    .clk, .rst_n, .ev_cycle(sw_cycle_begin), .ev_band(sw_band_begin), .ev_rx(rx_valid),
    .ctl_we(h_wr && h_addr == iso_pkg::REG_CONTROL), .ctl_wdata(h_wdata[4:0]),
    .status_rd, .control, .status, .irq
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_rdata <= '0;
    else if (h_rd) begin
      unique case (h_addr)
        iso_pkg::REG_RXDATA:  h_rdata <= rxb_empty ? '0 : rxb_dout;
        iso_pkg::REG_STATUS:  h_rdata <= WORD_W'({rxb_level, txb_level, status});
        iso_pkg::REG_CONTROL: h_rdata <= WORD_W'(control);
        iso_pkg::REG_BAND:    h_rdata <= WORD_W'(sw_band_idx);
        default:     h_rdata <= '0;
      endcase
    end
  end
endmodule
