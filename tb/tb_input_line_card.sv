// tb_input_line_card: sends serial words into the card while it is not
// granted (they must queue, busy high, and a word beyond the 4-word buffer
// is dropped), then grants it and checks that one word leaves per word time
// in arrival order; fills it again and checks that flush empties it.
// Finally a random phase (serial words with random gaps, grant toggled at
// random per word time): every word that leaves must be the next word sent
// that was not dropped, and after draining, words out + words dropped must
// equal words sent.
module tb_input_line_card;
  localparam int W = 40, D = 4;
  logic clk = 0, rst_n = 0, sdata = 0, svalid = 0, word_en, granted = 0, flush = 0;
  logic [W-1:0] word;
  logic word_valid, busy, dropped;
  logic [$clog2(D+1)-1:0] level;
  int checks = 0, failures = 0, ndrop = 0, wcnt = 0;
  logic [W-1:0] sent[$];

  input_line_card #(.WORD_W(W), .BUF_DEPTH(D)) dut (.*);
  always #1 clk = ~clk;

  // word_en every W clocks
  always @(posedge clk) wcnt <= (wcnt == W - 1) ? 0 : wcnt + 1;
  assign word_en = (wcnt == W - 1);
  always @(posedge clk) if (rst_n && dropped) ndrop++;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input logic [W-1:0] w);
    for (int b = W - 1; b >= 0; b--) begin
      sdata = w[b]; svalid = 1; @(negedge clk);
    end
    svalid = 0;
  endtask

  // random-phase scoreboard: a leaving word must be the oldest sent word not
  // yet seen, after skipping words that were dropped
  bit rnd_on = 0;
  logic [W-1:0] rsent[$];
  int nout = 0, ndrop_r = 0, pend_drop = 0;
  always @(posedge clk) if (rnd_on) begin
    if (dropped) begin ndrop_r++; pend_drop++; end
    if (word_en && granted && word_valid) begin
      int k;
      k = 0;
      while (k < rsent.size() && rsent[k] != word) k++;
      checks++;
      if (k == rsent.size() || k > pend_drop) begin
        failures++; $display("FAIL random phase: word %h out of order at %0t", word, $time);
      end else begin
        pend_drop -= k;
        repeat (k + 1) void'(rsent.pop_front());
      end
      nout++;
    end
  end

  initial begin
    logic [W-1:0] w;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy, "idle after reset");
    for (int n = 0; n < D + 1; n++) begin
      w = {$urandom, $urandom};
      if (n < D) sent.push_back(w);
      send(w);
    end
    repeat (3) @(negedge clk);
    chk(busy && 32'(level) == D, "buffer full, busy");
    chk(ndrop == 1, "fifth word dropped");
    // grant: one word per word time
    granted = 1;
    while (sent.size() != 0) begin
      while (!word_en) @(negedge clk);
      chk(word_valid && word == sent[0], $sformatf("head word offered %h exp %h n=%0d drop=%0d", word, sent[0], sent.size(), ndrop));
      void'(sent.pop_front());
      @(negedge clk);
      chk(32'(level) == sent.size(), "one word leaves per word time");
    end
    chk(!busy, "empty after draining");
    granted = 0;
    send({$urandom, $urandom});
    send({$urandom, $urandom});
    @(negedge clk);
    chk(32'(level) == 2, "refilled");
    flush = 1; @(negedge clk); flush = 0;
    chk(!busy && level == 0, "flushed at band end");

    // random phase
    rnd_on = 1;
    fork
      for (int n = 0; n < 400; n++) begin
        w = {$urandom, $urandom};
        rsent.push_back(w);
        send(w);
        repeat ($urandom_range(0, 60)) @(negedge clk);
      end
      forever begin
        while (!word_en) @(negedge clk);
        granted = ($urandom_range(0, 2) != 0);
        @(negedge clk);
      end
    join_any
    disable fork;
    granted = 1;
    repeat ((D + 2) * W) @(negedge clk);
    chk(!busy && level == 0, "drained");
    chk(nout + ndrop_r == 400, $sformatf("out %0d + dropped %0d = 400", nout, ndrop_r));
    chk(ndrop_r > 0, "random phase overflowed at least once");
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
