// isoswitch_top: an Isoswitch with a workstation interface card on port 1.
//
// The interface card's transmitter drives inport 1 and outport 1 drives its
// receiver; the switch's cycle/band signals and band index feed its signal
// detector. Ports 2..N keep their serial lines at the top's pins (they lead
// to optical converters and to other switches, which are outside this RTL),
// as do the switch's host configuration port (from the host controller) and
// the card's register port (from the workstation bus). One clock, the bit
// clock, runs everything. The pairing of the card with port 1 is this
// design's choice; the document attaches one workstation to the switch.
module isoswitch_top #(
  parameter int unsigned N_PORTS   = iso_pkg::N_PORTS,
  parameter int unsigned WORD_W    = iso_pkg::WORD_W,
  parameter int unsigned WPT       = iso_pkg::WORDS_PER_TICK,
  parameter int unsigned EXP_W     = iso_pkg::EXP_W,
  parameter int unsigned CT_AW     = iso_pkg::CT_AW,
  parameter int unsigned BUF_DEPTH = iso_pkg::IN_BUF_DEPTH,
  parameter int unsigned DLY_AW    = iso_pkg::DLY_AW,
  parameter int unsigned IF_DEPTH  = iso_pkg::IF_BUF_DEPTH,
  localparam int unsigned ENTRY_W  = 2 * N_PORTS * N_PORTS + EXP_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // serial lines of ports 2..N (index k is port k+1; port 1 is the card's)
  input  logic [1:N_PORTS-1]  rx_sdata,
  input  logic [1:N_PORTS-1]  rx_svalid,
  output logic [1:N_PORTS-1]  tx_sdata,
  output logic [1:N_PORTS-1]  tx_svalid,
  // host controller configuration port
  input  logic                h_we,
  input  logic [CT_AW-1:0]    h_addr,
  input  logic [ENTRY_W-1:0]  h_data,
  input  logic                h_bnd_we,
  input  logic [CT_AW-1:0]    h_bnd,
  input  logic                h_commit,
  output logic                h_pending,
  input  logic [0:N_PORTS-1]  h_dly_we,
  input  logic [DLY_AW-1:0]   h_dly,
  // workstation register port of the interface card
  input  logic                ws_wr,
  input  logic                ws_rd,
  input  logic [2:0]          ws_addr,
  input  logic [WORD_W-1:0]   ws_wdata,
  output logic [WORD_W-1:0]   ws_rdata,
  output logic                ws_irq,
  // synchronisation signals and status
  output logic                running,
  output logic [CT_AW-1:0]    band_idx,
  output logic                band_begin,
  output logic                cycle_begin,
  output logic [0:N_PORTS-1]  in_dropped,
  output logic [0:N_PORTS-1]  out_sent,
  output logic [15:0]         ws_rx_lost
);
  logic [0:N_PORTS-1] sw_rx_sdata, sw_rx_svalid, sw_tx_sdata, sw_tx_svalid;
  logic               word_en, tick_en, bank, band_end, card_burst;
  logic               card_tx_sdata, card_tx_svalid;

  assign sw_rx_sdata  = {card_tx_sdata, rx_sdata};
  assign sw_rx_svalid = {card_tx_svalid, rx_svalid};
  assign tx_sdata     = sw_tx_sdata[1:N_PORTS-1];
  assign tx_svalid    = sw_tx_svalid[1:N_PORTS-1];

  isoswitch #(
    .N_IN(N_PORTS), .N_OUT(N_PORTS), .WORD_W(WORD_W), .WPT(WPT), .EXP_W(EXP_W),
    .CT_AW(CT_AW), .BUF_DEPTH(BUF_DEPTH), .DLY_AW(DLY_AW)
  ) u_switch (
    .clk, .rst_n,
    .rx_sdata(sw_rx_sdata), .rx_svalid(sw_rx_svalid),
    .tx_sdata(sw_tx_sdata), .tx_svalid(sw_tx_svalid),
    .h_we, .h_addr, .h_data, .h_bnd_we, .h_bnd, .h_commit, .h_pending,
    .h_dly_we, .h_dly,
    .word_en, .tick_en, .running, .bank, .band_idx, .band_begin, .cycle_begin,
    .band_end, .in_dropped, .out_sent
  );

  interface_card #(.WORD_W(WORD_W), .BUF_DEPTH(IF_DEPTH), .CT_AW(CT_AW)) u_card (
    .clk, .rst_n, .word_en,
    .h_wr(ws_wr), .h_rd(ws_rd), .h_addr(ws_addr), .h_wdata(ws_wdata),
    .h_rdata(ws_rdata), .irq(ws_irq),
    .tx_sdata(card_tx_sdata), .tx_svalid(card_tx_svalid),
    .rx_sdata(sw_tx_sdata[0]), .rx_svalid(sw_tx_svalid[0]),
    .sw_cycle_begin(cycle_begin), .sw_band_begin(band_begin), .sw_band_idx(band_idx),
    .tx_burst_start(card_burst), .rx_lost(ws_rx_lost)
  );
endmodule
