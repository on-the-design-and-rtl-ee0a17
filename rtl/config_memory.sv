// config_memory: the Configuration Memory (CM) holding the configuration
// tables (CT) of the Isoswitch.
//
// One CT line is {Port Connection, Priority Port, Expiration}: N_OUT words of
// N_IN bits, again N_OUT words of N_IN bits, and an EXP_W-bit tick count,
// printed left to right (outport 1 first, inport 1 leftmost in each word).
//
// Two tandem RAMs hold two CTs. The active RAM is read asynchronously at the
// Program Counter (PC); the host writes the other RAM through h_we/h_addr/
// h_data and sets that RAM's Data Boundary register (address of its last
// valid line) through h_bnd_we. h_commit then tells the decision logic to
// change over at the end of the current cycle. While a change is pending
// (pending = 1) further host writes are ignored.
//
// Sequencing. advance (the band counter's expire) is examined on tick_en.
// On a tick with advance, PC steps to the next line, or back to 0 after the
// line at the boundary, where the RAMs swap if a change is pending. Before
// the first commit the switch is stopped (running = 0); the first commit
// starts it at line 0 on the next tick. band_go marks, on that tick, that a
// new line takes effect; cycle_go that it is line 0.
//
// entry is the line that holds from the next clock edge on: it is read
// combinationally at the next PC in the next RAM, so that a new line is
// fetched and used by the arbitration in the same tick, as in the document
// where the asynchronous RAM output settles within the tick.
//
// Two RAMs, PC, boundary registers, decision logic and the asynchronous read
// follow the document. The host port, the commit/pending handshake, the stop
// state before the first commit and the CT depth (2**CT_AW lines) are this
// design's choices.
module config_memory #(
  parameter int unsigned N_IN  = iso_pkg::N_PORTS,
  parameter int unsigned N_OUT = iso_pkg::N_PORTS,
  parameter int unsigned EXP_W = iso_pkg::EXP_W,
  parameter int unsigned CT_AW = iso_pkg::CT_AW,
  localparam int unsigned ENTRY_W = 2 * N_IN * N_OUT + EXP_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick_en,
  input  logic               advance,
  // host side
  input  logic               h_we,
  input  logic [CT_AW-1:0]   h_addr,
  input  logic [ENTRY_W-1:0] h_data,
  input  logic               h_bnd_we,
  input  logic [CT_AW-1:0]   h_bnd,
  input  logic               h_commit,
  output logic               pending,
  // switch side
  output logic               running,
  output logic               bank,      // RAM in use (0 = RAM I, 1 = RAM II)
  output logic [CT_AW-1:0]   pc,
  output logic [ENTRY_W-1:0] entry,
  output logic               band_go,
  output logic               cycle_go
);
  localparam int unsigned DEPTH = 1 << CT_AW;

  logic [ENTRY_W-1:0] ram0 [DEPTH];
  logic [ENTRY_W-1:0] ram1 [DEPTH];
  logic [CT_AW-1:0]   boundary [2];

  logic               bank_d, running_d;
  logic [CT_AW-1:0]   pc_d;

  // Decision logic: next PC, next RAM.
  always_comb begin
    bank_d    = bank;
    running_d = running;
    pc_d      = pc;
    band_go   = 1'b0;
    if (tick_en) begin
      if (!running) begin
        if (pending) begin
          running_d = 1'b1;
          bank_d    = !bank;
          pc_d      = '0;
          band_go   = 1'b1;
        end
      end else if (advance) begin
        band_go = 1'b1;
        if (pc == boundary[bank]) begin
          pc_d = '0;
          if (pending) bank_d = !bank;
        end else begin
          pc_d = pc + 1'b1;
        end
      end
    end
  end

  assign cycle_go = band_go && (pc_d == '0);
  assign entry    = running_d ? (bank_d ? ram1[pc_d] : ram0[pc_d]) : '0;

  // Host writes go to the RAM not in use.
  always_ff @(posedge clk) begin
    if (h_we && !pending) begin
      if (bank) ram0[h_addr] <= h_data;
      else      ram1[h_addr] <= h_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank     <= 1'b0;
      running  <= 1'b0;
      pc       <= '0;
      pending  <= 1'b0;
      boundary <= '{default: '0};
    end else begin
      bank    <= bank_d;
      running <= running_d;
      pc      <= pc_d;
      if (h_bnd_we && !pending) boundary[!bank] <= h_bnd;
      if (bank_d != bank)       pending <= 1'b0;
      else if (h_commit)        pending <= 1'b1;
    end
  end
endmodule
