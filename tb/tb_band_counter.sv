// tb_band_counter: loads expiration values and counts ticks until expire,
// re-loading on expiry like the control unit does; a band of E ticks must
// expire on its E-th tick (E = 0 on the first), and elapsed must count the
// ticks of the band. Ticks come every 4 clocks.
module tb_band_counter;
  localparam int EW = 12;
  logic clk = 0, rst_n = 0, tick_en = 0, load = 0;
  logic [EW-1:0] load_value = '0, count, elapsed;
  logic expire;
  int checks = 0, failures = 0;

  band_counter #(.EXP_W(EW)) dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(input bit ld, input int v);
    repeat (3) @(negedge clk);
    tick_en = 1; load = ld; load_value = EW'(v);
    @(negedge clk);
    tick_en = 0; load = 0;
  endtask

  initial begin
    int lens[] = '{5, 1, 0, 3, 12, 2, 4095};
    repeat (3) @(negedge clk);
    rst_n = 1;
    tick(1, lens[0]);
    for (int b = 0; b < lens.size(); b++) begin
      int k, expect_len;
      expect_len = (lens[b] == 0) ? 1 : lens[b];
      k = 0;
      forever begin
        k++;
        chk(32'(elapsed) == k - 1, $sformatf("elapsed band %0d tick %0d", b, k));
        if (expire) break;
        if (k > 5000) break;
        tick(0, 0);
      end
      chk(k == expect_len, $sformatf("band %0d lasted %0d ticks, expected %0d", b, k, expect_len));
      tick(1, (b + 1 < lens.size()) ? lens[b + 1] : 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
