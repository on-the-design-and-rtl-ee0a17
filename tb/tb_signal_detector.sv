// tb_signal_detector: random event pulses, control writes and status reads
// against a model of sticky, enable-masked, clear-on-read status bits and
// an interrupt that follows the interrupt-enable bit.
module tb_signal_detector;
  logic clk = 0, rst_n = 0, ev_cycle = 0, ev_band = 0, ev_rx = 0, ctl_we = 0, status_rd = 0;
  logic [4:0] ctl_wdata = '0, control;
  logic [2:0] status;
  logic irq;
  int checks = 0, failures = 0, nirq = 0;
  logic [4:0] m_ctl;
  logic [2:0] m_st;

  signal_detector dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [2:0] ev;
    repeat (3) @(negedge clk);
    rst_n = 1;
    m_ctl = '0; m_st = '0;
    for (int n = 0; n < 3000; n++) begin
      chk(control == m_ctl && status == m_st, "registers");
      chk(irq == (m_ctl[3] && m_st != 0), "irq");
      if (irq) nirq++;
      ev = 3'($urandom);
      {ev_rx, ev_band, ev_cycle} = ev & {$urandom_range(0, 3) == 0, $urandom_range(0, 3) == 0, $urandom_range(0, 3) == 0};
      ctl_we = ($urandom_range(0, 30) == 0);
      ctl_wdata = 5'($urandom);
      status_rd = ($urandom_range(0, 10) == 0);
      @(negedge clk);
      m_st = (status_rd ? 3'b0 : m_st) | ({ev_rx, ev_band, ev_cycle} & m_ctl[2:0]);
      if (ctl_we) m_ctl = ctl_wdata;
      ctl_we = 0; status_rd = 0; {ev_rx, ev_band, ev_cycle} = '0;
    end
    chk(nirq > 0, "interrupt raised at least once");
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
