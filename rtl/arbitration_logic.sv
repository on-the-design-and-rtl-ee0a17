// arbitration_logic: combinational grant decision of the Isoswitch.
//
// For every outport j, independently and in parallel:
//   * if some busy inport i has its priority bit pri[j][i] set, i is granted;
//   * otherwise one busy inport whose connection bit con[j][i] is set is
//     chosen at random and granted;
//   * otherwise the outport stays idle.
// The random choice scans the connected busy inports circularly starting at
// inport rnd[j] and takes the first one found; the caller supplies fresh
// random offsets every tick. An inport may be granted to several outports at
// once (multicast trees). Outputs: grant matrix, and for the switching fabric
// a select index and an enable per outport. Purely combinational; the
// control unit registers the result.
//
// Bit order follows the configuration table: word j of con/pri belongs to
// outport j+1 and, within a word, the leftmost bit to inport 1, hence the
// ascending packed ranges [0:N-1]. Busy is ordered the same way.
//
// The rule list follows the document's algorithm. Where a priority inport is
// set but idle, the algorithm's wording would leave the outport idle while
// the document's description of priority bands lets contention traffic use
// the band; this design follows the latter. The scan-from-random-offset is
// this design's way of making the random pick.
module arbitration_logic #(
  parameter int unsigned N_IN  = iso_pkg::N_PORTS,
  parameter int unsigned N_OUT = iso_pkg::N_PORTS,
  localparam int unsigned SW   = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [0:N_OUT-1][0:N_IN-1] con,
  input  logic [0:N_OUT-1][0:N_IN-1] pri,
  input  logic [0:N_IN-1]            busy,
  input  logic [0:N_OUT-1][SW-1:0]   rnd,
  output logic [0:N_OUT-1][0:N_IN-1] grant,
  output logic [0:N_OUT-1][SW-1:0]   sel,
  output logic [0:N_OUT-1]           en
);
  always_comb begin
    grant = '0;
    sel   = '0;
    en    = '0;
    for (int j = 0; j < N_OUT; j++) begin
      // Step 2.1: a busy inport with priority wins.
      for (int i = 0; i < N_IN; i++) begin
        if (!en[j] && pri[j][i] && busy[i]) begin
          en[j]       = 1'b1;
          sel[j]      = SW'(i);
          grant[j][i] = 1'b1;
        end
      end
      // Step 2.2: otherwise pick among busy connected inports.
      if (!en[j]) begin
        for (int k = 0; k < N_IN; k++) begin
          if (!en[j] && con[j][(32'(rnd[j]) + k) % N_IN] && busy[(32'(rnd[j]) + k) % N_IN]) begin
            en[j]                                 = 1'b1;
            sel[j]                                = SW'((32'(rnd[j]) + k) % N_IN);
            grant[j][(32'(rnd[j]) + k) % N_IN]    = 1'b1;
          end
        end
      end
    end
  end
endmodule
