// isoswitch: the electronic Isochronet switch (RDMA+).
//
// Isochronets switch by Route Division Multiple Access: time is divided into
// bands, and in each band the switch is configured as part of one or more
// routing trees. Frames are never parsed; an inport's words simply go to the
// outport(s) its tree leads to during that band. This block holds
//   * N_IN input line cards (serial-to-parallel conversion, input buffers),
//   * the switching fabric (one multiplexer per outport),
//   * the control unit (configuration memory, band counter, arbitration),
//   * N_OUT output line cards (delay module, parallel-to-serial conversion),
//   * the time base giving word and tick strobes from the bit clock.
//
// Timing (at the defaults): the clock is the 1 GHz bit clock; one 40-bit
// word moves per port every 40 clocks; the control unit decides once per
// tick of 8 word times (320 clocks, 3.125 MHz). A word waits at most one
// tick in its input buffer before its inport is selected (if no other
// inport contends), crosses the fabric in one word time and leaves after the
// outport's programmed delay. At the end of every band the input buffers
// are emptied (RDMA+: contending frames are kept only for their band).
//
// Host side: CT line writes into the idle RAM, boundary write and commit
// (see config_memory), and one delay value per outport (h_dly_we selects
// the outport). Synchronisation outputs: cycle_begin, band_begin (one clock
// pulses) and band_idx.
//
// The structure follows the document. The single-clock timing and the host
// port are this design's choices.
module isoswitch #(
  parameter int unsigned N_IN      = iso_pkg::N_PORTS,
  parameter int unsigned N_OUT     = iso_pkg::N_PORTS,
  parameter int unsigned WORD_W    = iso_pkg::WORD_W,
  parameter int unsigned WPT       = iso_pkg::WORDS_PER_TICK,
  parameter int unsigned EXP_W     = iso_pkg::EXP_W,
  parameter int unsigned CT_AW     = iso_pkg::CT_AW,
  parameter int unsigned BUF_DEPTH = iso_pkg::IN_BUF_DEPTH,
  parameter int unsigned DLY_AW    = iso_pkg::DLY_AW,
  localparam int unsigned ENTRY_W  = 2 * N_IN * N_OUT + EXP_W,
  localparam int unsigned SW       = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // serial lines (electrical side of the optical converters)
  input  logic [0:N_IN-1]    rx_sdata,
  input  logic [0:N_IN-1]    rx_svalid,
  output logic [0:N_OUT-1]   tx_sdata,
  output logic [0:N_OUT-1]   tx_svalid,
  // host configuration port
  input  logic               h_we,
  input  logic [CT_AW-1:0]   h_addr,
  input  logic [ENTRY_W-1:0] h_data,
  input  logic               h_bnd_we,
  input  logic [CT_AW-1:0]   h_bnd,
  input  logic               h_commit,
  output logic               h_pending,
  input  logic [0:N_OUT-1]   h_dly_we,
  input  logic [DLY_AW-1:0]  h_dly,
  // status and synchronisation
  output logic               word_en,
  output logic               tick_en,
  output logic               running,
  output logic               bank,
  output logic [CT_AW-1:0]   band_idx,
  output logic               band_begin,
  output logic               cycle_begin,
  output logic               band_end,
  output logic [0:N_IN-1]    in_dropped,
  output logic [0:N_OUT-1]   out_sent
);
  logic [0:N_IN-1][WORD_W-1:0]  in_word;
  logic [0:N_IN-1]              in_valid, busy, in_granted;
  logic [0:N_OUT-1][SW-1:0]     sel;
  logic [0:N_OUT-1]             en;
  logic [0:N_OUT-1][WORD_W-1:0] fab_word;
  logic [0:N_OUT-1]             fab_valid;
  logic [EXP_W-1:0]             elapsed;

  iso_timebase #(.WORD_W(WORD_W), .WORDS_PER_TICK(WPT)) u_tb (
    .clk, .rst_n, .word_en, .tick_en
  );

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    input_line_card #(.WORD_W(WORD_W), .BUF_DEPTH(BUF_DEPTH)) u_ilc (
      .clk, .rst_n, .sdata(rx_sdata[i]), .svalid(rx_svalid[i]),
      .word_en, .granted(in_granted[i]), .flush(band_end),
      .word(in_word[i]), .word_valid(in_valid[i]), .busy(busy[i]),
      .dropped(in_dropped[i]), .level()
    );
  end

  control_unit #(.N_IN(N_IN), .N_OUT(N_OUT), .EXP_W(EXP_W), .CT_AW(CT_AW)) u_cu (
    .clk, .rst_n, .tick_en, .busy,
    .h_we, .h_addr, .h_data, .h_bnd_we, .h_bnd, .h_commit, .h_pending,
    .sel, .en, .in_granted,
    .running, .bank, .band_idx, .elapsed, .band_begin, .cycle_begin, .band_end
  );

  switching_fabric #(.N_IN(N_IN), .N_OUT(N_OUT), .WORD_W(WORD_W)) u_fabric (
    .clk, .rst_n, .word_en, .in_word, .in_valid, .sel, .en,
    .out_word(fab_word), .out_valid(fab_valid)
  );

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    output_line_card #(.WORD_W(WORD_W), .DLY_AW(DLY_AW)) u_olc (
      .clk, .rst_n, .word_en, .word(fab_word[j]), .word_valid(fab_valid[j]),
      .h_delay_we(h_dly_we[j]), .h_delay(h_dly),
      .sdata(tx_sdata[j]), .svalid(tx_svalid[j]), .sent(out_sent[j])
    );
  end
endmodule
