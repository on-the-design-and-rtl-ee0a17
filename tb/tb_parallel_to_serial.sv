// tb_parallel_to_serial: loads random words, some back to back (every
// WORD_W clocks) and some with gaps, and checks the serial line bit by bit:
// MSB first, starting on the clock after the load, svalid high for exactly
// WORD_W clocks. Inputs change and outputs are checked on the falling edge.
module tb_parallel_to_serial;
  localparam int W = 40;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] word = '0;
  logic sdata, svalid;
  int checks = 0, failures = 0;

  parallel_to_serial #(.WORD_W(W)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [W-1:0] w;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!svalid, "idle after reset");
    w = {$urandom, $urandom};
    word = w; load = 1'b1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      load = 1'b0;
      for (int b = W - 1; b >= 0; b--) begin
        chk(svalid && sdata == w[b], $sformatf("word %0d bit %0d", n, b));
        if (b == 0) begin
          w = {$urandom, $urandom};
          word = w;
          // odd words: next word follows straight away
          load = (n % 2 == 1);
        end
        @(negedge clk);
      end
      if (n % 2 == 0) begin
        chk(!svalid, "svalid falls after WORD_W bits");
        repeat ($urandom_range(0, 3)) @(negedge clk);
        chk(!svalid, "line idle between words");
        load = 1'b1;
      end else begin
        load = 1'b0;
      end
      if (n % 2 == 1) begin
        // word was loaded on the last bit of the previous one: check it now
        for (int b = W - 1; b >= 0; b--) begin
          chk(svalid && sdata == w[b], $sformatf("b2b word %0d bit %0d", n, b));
          @(negedge clk);
        end
        chk(!svalid, "svalid falls after back-to-back word");
        w = {$urandom, $urandom};
        word = w; load = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
