// tb_word_fifo: random push/pop traffic against a queue model, including
// overflow at full depth and periodic flushes. Inputs change and outputs
// are checked on the falling edge.
module tb_word_fifo;
  localparam int W = 40, D = 8;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, ovf_seen = 0;
  logic [W-1:0] model[$];

  word_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    bit exp_ovf;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      chk(32'(count) == model.size(), "count");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == D), "full");
      if (model.size() != 0) chk(dout == model[0], "dout");
      push  = ($urandom_range(0, 99) < (n < 1500 ? 60 : 40));
      pop   = ($urandom_range(0, 99) < (n < 1500 ? 40 : 60)) && model.size() != 0;
      din   = {$urandom, $urandom};
      flush = (n % 700 == 699);
      exp_ovf = !flush && push && model.size() == D && !pop;
      @(negedge clk);
      if (flush) model.delete();
      else begin
        if (pop) void'(model.pop_front());
        if (push && !exp_ovf) model.push_back(din);
      end
      chk(overflow == exp_ovf, "overflow flag");
      if (exp_ovf) ovf_seen++;
    end
    chk(ovf_seen > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
