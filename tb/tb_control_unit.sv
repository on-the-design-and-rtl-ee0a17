// tb_control_unit: runs the document's two example configuration lines as a
// two-band cycle (3 ticks, then 2 ticks) and checks, tick by tick, the
// band/cycle signals, the band lengths, and the fabric selects for busy
// patterns whose outcome is fixed (priority, single contender, multicast,
// idle). Grants must be 0 on the first tick of each band (RDMA+ flush) and
// before the table is committed. Ticks come every 8 clocks.
module tb_control_unit;
  localparam int N = 4, M = 4, EW = 12, AW = 4, EN_W = 2 * N * M + EW, SW = 2;
  logic clk = 0, rst_n = 0, tick_en = 0;
  logic [0:N-1] busy = '0;
  logic h_we = 0, h_bnd_we = 0, h_commit = 0, h_pending;
  logic [AW-1:0] h_addr = '0, h_bnd = '0;
  logic [EN_W-1:0] h_data = '0;
  logic [0:M-1][SW-1:0] sel;
  logic [0:M-1] en;
  logic [0:N-1] in_granted;
  logic running, bank, band_begin, cycle_begin, band_end;
  logic [AW-1:0] band_idx;
  logic [EW-1:0] elapsed;
  int checks = 0, failures = 0;
  int nband = 0, ncycle = 0;

  control_unit #(.N_IN(N), .N_OUT(M), .EXP_W(EW), .CT_AW(AW)) dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (band_begin) nband++;
    if (cycle_begin) ncycle++;
  end

  // One tick with the given busy lines; returns after the grant update.
  task automatic tick(input logic [0:N-1] b);
    busy = b;
    repeat (7) @(negedge clk);
    tick_en = 1;
    @(negedge clk);
    tick_en = 0;
  endtask

  // expected en and sel (sel checked only where en)
  task automatic expect_grant(input logic [0:M-1] e, input logic [0:M-1][SW-1:0] s,
                              input string what);
    chk(en == e, {what, ": enables"});
    for (int j = 0; j < M; j++) if (e[j]) chk(sel[j] == s[j], $sformatf("%s: sel out %0d", what, j + 1));
  endtask

  localparam logic [0:M-1][SW-1:0] S_L1 = {2'd0, 2'd2, 2'd0, 2'd0}; // out2<-in3, out4<-in1
  localparam logic [0:M-1][SW-1:0] S_L2 = {2'd0, 2'd2, 2'd0, 2'd0}; // out1,3,4<-in1, out2<-in3

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    tick(4'b1111);
    expect_grant(4'b0000, '0, "no table");
    h_we = 1; h_addr = 0; h_data = 44'b0000_0011_0000_1000_0000_0010_0000_0000_000000000011;
    @(negedge clk);
    h_addr = 1; h_data = 44'b1000_0010_1000_1000_0000_0000_0000_0000_000000000010;
    @(negedge clk);
    h_we = 0; h_bnd_we = 1; h_bnd = 1; @(negedge clk); h_bnd_we = 0;
    h_commit = 1; @(negedge clk); h_commit = 0;
    chk(h_pending, "pending");
    for (int cyc = 0; cyc < 3; cyc++) begin
      // band 0: 3 ticks
      tick(4'b1011);
      chk(band_begin && band_idx == 0 && cycle_begin, "band 0 begins with the cycle");
      if (cyc == 0) expect_grant(4'b0101, S_L1, "first band: nothing was flushed yet");
      else expect_grant(4'b0000, '0, "band 0 first tick flushed");
      tick(4'b1011);
      chk(!band_begin, "band 0 continues");
      expect_grant(4'b0101, S_L1, "band 0: in3 priority on out2, in1 to out4");
      tick(4'b0001);
      expect_grant(4'b0100, {2'd0, 2'd3, 2'd0, 2'd0}, "band 0: priority idle, in4 contends");
      // band 1: 2 ticks
      tick(4'b1010);
      chk(band_begin && band_idx == 1 && !cycle_begin, "band 1 begins after 3 ticks");
      expect_grant(4'b0000, '0, "band 1 first tick flushed");
      tick(4'b1010);
      expect_grant(4'b1111, S_L2, "band 1: in1 multicast, in3 to out2");
      chk(in_granted == 4'b1010, "in_granted");
    end
    tick(4'b0000);
    chk(band_idx == 0 && band_begin, "cycle repeats");
    @(negedge clk);
    chk(nband == 7 && ncycle == 4, $sformatf("band/cycle counts %0d %0d", nband, ncycle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
