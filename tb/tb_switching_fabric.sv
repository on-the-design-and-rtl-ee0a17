// tb_switching_fabric: random selects, enables and input words; each outport
// must show, one word time later, the selected inport's word, valid only if
// enabled and the inport offered a valid word; between word times the
// outputs must hold.
module tb_switching_fabric;
  localparam int N = 4, M = 4, W = 40, SW = 2;
  logic clk = 0, rst_n = 0, word_en = 0;
  logic [0:N-1][W-1:0] in_word = '0;
  logic [0:N-1] in_valid = '0;
  logic [0:M-1][SW-1:0] sel = '0;
  logic [0:M-1] en = '0;
  logic [0:M-1][W-1:0] out_word;
  logic [0:M-1] out_valid;
  int checks = 0, failures = 0;

  switching_fabric #(.N_IN(N), .N_OUT(M), .WORD_W(W)) dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [0:M-1][W-1:0] ew;
    logic [0:M-1] ev;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N; i++) in_word[i] = {$urandom, $urandom};
      in_valid = N'($urandom);
      sel = (2 * M)'($urandom);
      en = M'($urandom);
      word_en = 1;
      for (int j = 0; j < M; j++) begin
        ew[j] = in_word[sel[j]];
        ev[j] = en[j] && in_valid[sel[j]];
      end
      @(negedge clk);
      word_en = 0;
      for (int j = 0; j < M; j++) begin
        chk(out_valid[j] == ev[j], $sformatf("valid out %0d", j));
        chk(out_word[j] == ew[j], $sformatf("word out %0d", j));
      end
      // change inputs without word_en: outputs hold
      in_word = '0; sel = ~sel;
      @(negedge clk);
      chk(out_word == ew && out_valid == ev, "hold between word times");
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
