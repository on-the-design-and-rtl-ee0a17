// tb_config_memory: loads a 3-line table into the idle RAM, commits it and
// checks that the switch starts on the next tick at line 0, steps through
// the lines on each advance, wraps after the boundary line with cycle_go,
// and shows each line's contents. A second 2-line table is loaded while the
// first runs: the change must wait for the end of the cycle, and host
// writes during the pending change must be ignored.
module tb_config_memory;
  localparam int N = 4, M = 4, EW = 12, AW = 4, EN_W = 2 * N * M + EW;
  logic clk = 0, rst_n = 0, tick_en = 0, advance = 0;
  logic h_we = 0, h_bnd_we = 0, h_commit = 0;
  logic [AW-1:0] h_addr = '0, h_bnd = '0;
  logic [EN_W-1:0] h_data = '0;
  logic pending, running, bank, band_go, cycle_go;
  logic [AW-1:0] pc;
  logic [EN_W-1:0] entry;
  int checks = 0, failures = 0;
  logic [EN_W-1:0] t1 [3], t2 [2];

  config_memory #(.N_IN(N), .N_OUT(M), .EXP_W(EW), .CT_AW(AW)) dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic host_write(input int a, input logic [EN_W-1:0] d);
    h_we = 1; h_addr = AW'(a); h_data = d; @(negedge clk); h_we = 0;
  endtask

  // One tick; checks band_go/cycle_go and the entry seen during it.
  task automatic tick(input bit adv, input bit exp_go, input bit exp_cyc,
                      input logic [EN_W-1:0] exp_entry, input string what);
    tick_en = 1; advance = adv;
    #0.5;
    chk(band_go == exp_go && cycle_go == exp_cyc, {what, ": go flags"});
    if (exp_go) chk(entry == exp_entry, {what, ": entry"});
    @(negedge clk);
    tick_en = 0; advance = 0;
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 3; i++) t1[i] = {$urandom, $urandom};
    for (int i = 0; i < 2; i++) t2[i] = {$urandom, $urandom};
    t1[0] = 44'b0000_0011_0000_1000_0000_0010_0000_0000_100011110001; // example line 1
    t1[1] = 44'b1000_0010_1000_1000_0000_0000_0000_0000_000111101100; // example line 2
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(!running && bank == 0, "stopped after reset");
    tick(1, 0, 0, '0, "no table yet");
    for (int i = 0; i < 3; i++) host_write(i, t1[i]);
    h_bnd_we = 1; h_bnd = 2; @(negedge clk); h_bnd_we = 0;
    h_commit = 1; @(negedge clk); h_commit = 0;
    chk(pending, "commit pending");
    tick(0, 1, 1, t1[0], "start");
    chk(running && bank == 1 && pc == 0 && !pending, "running on RAM II line 0");
    tick(0, 0, 0, '0, "no advance");
    chk(pc == 0, "pc holds");
    tick(1, 1, 0, t1[1], "line 1");
    chk(pc == 1, "pc 1");
    // load the second table meanwhile (goes to RAM I)
    host_write(0, t2[0]); host_write(1, t2[1]);
    h_bnd_we = 1; h_bnd = 1; @(negedge clk); h_bnd_we = 0;
    h_commit = 1; @(negedge clk); h_commit = 0;
    host_write(0, '1);   // ignored: change pending
    tick(1, 1, 0, t1[2], "line 2, old table still in use");
    chk(pc == 2 && bank == 1 && pending, "pc 2, old bank, pending");
    tick(1, 1, 1, t2[0], "wrap to new table");
    chk(pc == 0 && bank == 0 && !pending, "swapped at cycle end");
    tick(1, 1, 0, t2[1], "new line 1");
    tick(1, 1, 1, t2[0], "new table wraps at its boundary");
    tick(1, 1, 0, t2[1], "second cycle line 1");
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
