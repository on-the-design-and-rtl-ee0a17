// tb_serial_to_parallel: sends random words MSB first, with idle gaps and
// an aborted partial word, and checks each assembled word and that it is
// flagged exactly one clock after its last bit. Inputs change and outputs
// are checked on the falling clock edge.
module tb_serial_to_parallel;
  localparam int W = 40;
  logic clk = 0, rst_n = 0, sdata = 0, svalid = 0;
  logic [W-1:0] word;
  logic word_valid;
  int checks = 0, failures = 0;

  serial_to_parallel #(.WORD_W(W)) dut (.*);
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
    for (int n = 0; n < 30; n++) begin
      w = {$urandom, $urandom};
      for (int b = W - 1; b >= 0; b--) begin
        sdata = w[b]; svalid = 1'b1;
        @(negedge clk);
        if (b != 0) chk(!word_valid, "no word before the last bit");
      end
      svalid = 1'b0;
      chk(word_valid && word == w, $sformatf("word %0d", n));
      @(negedge clk);
      chk(!word_valid, "valid lasts one clock");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      if (n == 10) begin
        for (int b = 0; b < 17; b++) begin
          sdata = 1'b1; svalid = 1'b1; @(negedge clk);
        end
        svalid = 1'b0; @(negedge clk);
        chk(!word_valid, "partial word discarded");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
