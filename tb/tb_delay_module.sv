// tb_delay_module: for several programmed delays (0, 1, 5, 200 word times)
// feeds a random stream of valid and idle words and checks that every word
// comes out exactly 'delay' word times later with its status bit, and that
// nothing is enabled before the first delayed word (status cleared when the
// delay is loaded). word_en is given every clock to keep the run short.
module tb_delay_module;
  localparam int W = 40, AW = 8;
  logic clk = 0, rst_n = 0, word_en = 0, in_busy = 0, h_delay_we = 0;
  logic [W-1:0] in_word = '0, out_word;
  logic [AW-1:0] h_delay = '0, delay_q;
  logic out_en;
  int checks = 0, failures = 0;

  delay_module #(.WORD_W(W), .DLY_AW(AW)) dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int delays[] = '{0, 1, 5, 200, 3};
    logic [W-1:0] hw [$];
    logic hv [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (delays[d]) begin
      // fill the RAM with valid words first, so clearing is tested
      word_en = 1; in_busy = 1;
      repeat (300) begin in_word = {$urandom, $urandom}; @(negedge clk); end
      word_en = 0;
      h_delay_we = 1; h_delay = AW'(delays[d]); @(negedge clk); h_delay_we = 0;
      chk(32'(delay_q) == delays[d], "delay register");
      hw.delete(); hv.delete();
      word_en = 1;
      for (int t = 0; t < 600; t++) begin
        in_word = {$urandom, $urandom};
        in_busy = ($urandom_range(0, 2) != 0);
        hw.push_back(in_word); hv.push_back(in_busy);
        @(negedge clk);
        if (t < delays[d]) chk(!out_en, $sformatf("delay %0d: nothing before the delay", delays[d]));
        else begin
          int s;
          s = t - delays[d];
          chk(out_en == hv[s], $sformatf("delay %0d: status at %0d", delays[d], t));
          if (hv[s]) chk(out_word == hw[s], $sformatf("delay %0d: word at %0d", delays[d], t));
        end
      end
      word_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
