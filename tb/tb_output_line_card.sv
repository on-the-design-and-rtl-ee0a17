// tb_output_line_card: presents a random stream of valid and idle words,
// one per word time, with delay 3 and then 0, captures the serial line and
// checks that exactly the valid words are transmitted, in order, each
// starting on the line delay word times plus one clock after the word_en
// that took it in. Idle words must leave the line idle.
module tb_output_line_card;
  localparam int W = 40, AW = 6;
  logic clk = 0, rst_n = 0, word_en, word_valid = 0, h_delay_we = 0;
  logic [W-1:0] word = '0;
  logic [AW-1:0] h_delay = '0;
  logic sdata, svalid, sent;
  int checks = 0, failures = 0, wcnt = 0;
  longint cyc = 0;
  int dly = 0;
  logic [W-1:0] exp_w[$];
  longint exp_t[$];

  output_line_card #(.WORD_W(W), .DLY_AW(AW)) dut (.*);
  always #1 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    wcnt <= (wcnt == W - 1) ? 0 : wcnt + 1;
  end
  assign word_en = (wcnt == W - 1);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Serial monitor.
  logic [W-1:0] sh;
  int nb = 0;
  longint t0;
  always @(negedge clk) if (rst_n) begin
    if (svalid) begin
      if (nb == 0) t0 = cyc;
      sh = {sh[W-2:0], sdata};
      nb++;
      if (nb == W) begin
        nb = 0;
        chk(exp_w.size() != 0, "unexpected word on the line");
        if (exp_w.size() != 0) begin
          chk(sh == exp_w[0], "word contents");
          chk(t0 == exp_t[0], $sformatf("word start at %0d, expected %0d", t0, exp_t[0]));
          void'(exp_w.pop_front()); void'(exp_t.pop_front());
        end
      end
    end else chk(nb == 0, "line idle only between words");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      dly = (phase == 0) ? 3 : 0;
      while (!word_en) @(negedge clk);
      @(negedge clk);
      h_delay_we = 1; h_delay = AW'(dly); @(negedge clk); h_delay_we = 0;
      for (int n = 0; n < 60; n++) begin
        while (!word_en) @(negedge clk);
        word = {$urandom, $urandom};
        word_valid = ($urandom_range(0, 3) != 0) && n < 50;
        if (word_valid) begin
          exp_w.push_back(word);
          // edge at cyc -> value cyc+1 after it; line starts dly word times + 1 clock later
          exp_t.push_back(cyc + 1 + longint'(dly) * W + 1);
        end
        @(negedge clk);
      end
      chk(exp_w.size() == 0, "all words transmitted");
    end
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
