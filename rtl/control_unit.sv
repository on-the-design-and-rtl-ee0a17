// control_unit: configuration and arbitration of the Isoswitch.
//
// Holds the configuration memory, the band counter, a random source and the
// arbitration logic. On every tick (tick_en) the grant flip-flops take the
// arbitration result for the line that holds from this tick on and the
// inport busy lines sampled at the tick, so a word that arrives is selected
// at the latest one tick (320 ns) later. The grants hold for the whole tick
// (8 word times). Until the first configuration is committed the grants
// are 0.
//
// Outputs: per outport a select index and enable for the switching fabric,
// per inport whether it is granted to any outport (its buffer may then send),
// and the synchronisation signals for attached nodes: band_begin and
// cycle_begin pulse for one clock on the clock after the tick a band/cycle
// starts; band_idx is the CT line in use. band_end is high during the tick
// clock on which a running band ends (combinational): the RDMA+ input
// buffers are emptied on that edge, so the arbitration sees every inport as
// idle for it and the first grants of a band come one tick after its start.
//
// The composition (CM, Counter, AL) follows the document; registering the
// grants once per tick and the signal timing are this design's choices.
module control_unit #(
  parameter int unsigned N_IN  = iso_pkg::N_PORTS,
  parameter int unsigned N_OUT = iso_pkg::N_PORTS,
  parameter int unsigned EXP_W = iso_pkg::EXP_W,
  parameter int unsigned CT_AW = iso_pkg::CT_AW,
  localparam int unsigned ENTRY_W = 2 * N_IN * N_OUT + EXP_W,
  localparam int unsigned SW      = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       tick_en,
  input  logic [0:N_IN-1]            busy,
  // host side
  input  logic                       h_we,
  input  logic [CT_AW-1:0]           h_addr,
  input  logic [ENTRY_W-1:0]         h_data,
  input  logic                       h_bnd_we,
  input  logic [CT_AW-1:0]           h_bnd,
  input  logic                       h_commit,
  output logic                       h_pending,
  // fabric side
  output logic [0:N_OUT-1][SW-1:0]   sel,
  output logic [0:N_OUT-1]           en,
  output logic [0:N_IN-1]            in_granted,
  // status and synchronisation
  output logic                       running,
  output logic                       bank,
  output logic [CT_AW-1:0]           band_idx,
  output logic [EXP_W-1:0]           elapsed,
  output logic                       band_begin,
  output logic                       cycle_begin,
  output logic                       band_end
);
  logic [ENTRY_W-1:0]         entry;
  logic [0:N_OUT-1][0:N_IN-1] con, pri;
  logic [EXP_W-1:0]           exp_ticks;
  logic                       expire, band_go, cycle_go;
  logic [EXP_W-1:0]           count;
  logic [15:0]                rnd_word;
  logic [0:N_OUT-1][SW-1:0]   rnd;
  logic [0:N_OUT-1][0:N_IN-1] grant_c;
  logic [0:N_OUT-1][SW-1:0]   sel_c;
  logic [0:N_OUT-1]           en_c;
  logic [0:N_OUT-1][0:N_IN-1] grant_q;
  logic [0:N_IN-1]            busy_eff;

  config_memory #(.N_IN(N_IN), .N_OUT(N_OUT), .EXP_W(EXP_W), .CT_AW(CT_AW)) u_cm (
    .clk, .rst_n, .tick_en, .advance(expire),
    .h_we, .h_addr, .h_data, .h_bnd_we, .h_bnd, .h_commit, .pending(h_pending),
    .running, .bank, .pc(band_idx), .entry, .band_go, .cycle_go
  );

  assign {con, pri, exp_ticks} = entry;

  band_counter #(.EXP_W(EXP_W)) u_counter (
    .clk, .rst_n, .tick_en, .load(band_go), .load_value(exp_ticks),
    .count, .elapsed, .expire
  );

  iso_lfsr u_rnd (.clk, .rst_n, .step(tick_en), .value(rnd_word));

  // Each outport takes its own slice of the random word.
  always_comb begin
    for (int j = 0; j < N_OUT; j++)
      rnd[j] = SW'(rnd_word >> ((j * SW) % 16)) ^ SW'(j);
  end

  assign band_end = band_go && running;
  assign busy_eff = band_end ? '0 : busy;

  arbitration_logic #(.N_IN(N_IN), .N_OUT(N_OUT)) u_al (
    .con, .pri, .busy(busy_eff), .rnd, .grant(grant_c), .sel(sel_c), .en(en_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_q     <= '0;
      sel         <= '0;
      en          <= '0;
      band_begin  <= 1'b0;
      cycle_begin <= 1'b0;
    end else begin
      band_begin  <= band_go;
      cycle_begin <= cycle_go;
      if (tick_en) begin
        grant_q <= grant_c;
        sel     <= sel_c;
        en      <= en_c;
      end
    end
  end

  always_comb begin
    in_granted = '0;
    for (int j = 0; j < N_OUT; j++) in_granted |= grant_q[j];
  end
endmodule
