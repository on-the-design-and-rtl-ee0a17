// tb_arbitration_logic: checks the grant rules on the two configuration
// lines printed in the document's example table and on random inputs:
// a busy priority inport always wins; otherwise exactly one busy connected
// inport is granted; an outport with no busy connected inport stays idle;
// sel/en agree with the grant matrix; and over many random offsets every
// contender of a contended outport gets chosen at least once.
module tb_arbitration_logic;
  localparam int N = 4, M = 4, SW = 2;
  logic [0:M-1][0:N-1] con, pri, grant;
  logic [0:N-1]        busy;
  logic [0:M-1][SW-1:0] rnd, sel;
  logic [0:M-1]        en;
  int checks = 0, failures = 0;

  arbitration_logic #(.N_IN(N), .N_OUT(M)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Independent check of one evaluation.
  task automatic verify();
    for (int j = 0; j < M; j++) begin
      int npri, ncand, ngrant, g;
      npri = 0; ncand = 0; ngrant = 0; g = -1;
      for (int i = 0; i < N; i++) begin
        if (pri[j][i] && busy[i]) npri++;
        if (con[j][i] && busy[i]) ncand++;
        if (grant[j][i]) begin ngrant++; g = i; end
      end
      if (npri > 0) chk(ngrant == 1 && pri[j][g] && busy[g], $sformatf("priority out %0d", j));
      else if (ncand > 0) chk(ngrant == 1 && con[j][g] && busy[g], $sformatf("contention out %0d", j));
      else chk(ngrant == 0, $sformatf("idle out %0d", j));
      chk(en[j] == (ngrant == 1), "en");
      if (ngrant == 1) chk(32'(sel[j]) == g, "sel");
    end
  endtask

  initial begin
    int seen [N];
    // Example table line 1: out2 <- in3,in4 with in3 priority; out4 <- in1.
    con = 16'b0000_0011_0000_1000;
    pri = 16'b0000_0010_0000_0000;
    busy = 4'b1011; rnd = '0;
    #1;
    chk(grant == 16'b0000_0010_0000_1000, "line 1, all busy: in3 has priority on out2");
    verify();
    busy = 4'b1001; #1;
    chk(grant == 16'b0000_0001_0000_1000, "line 1, priority idle: contention in4 on out2");
    verify();
    // Example line 2: in1 multicast to out1,out3,out4; out2 <- in3.
    con = 16'b1000_0010_1000_1000;
    pri = '0;
    busy = 4'b1010; #1;
    chk(grant == 16'b1000_0010_1000_1000, "line 2 multicast");
    verify();
    busy = 4'b0000; #1;
    chk(grant == '0 && en == '0, "nothing busy");
    // Random choice covers every contender.
    con = {4'b1111, 4'b0110, 4'b1001, 4'b0000};
    pri = '0; busy = 4'b1111;
    foreach (seen[i]) seen[i] = 0;
    for (int r = 0; r < 200; r++) begin
      rnd = {$urandom};
      #1; verify();
      for (int i = 0; i < N; i++) if (grant[0][i]) seen[i]++;
    end
    for (int i = 0; i < N; i++) chk(seen[i] > 0, $sformatf("inport %0d chosen sometime", i));
    // Random sweep.
    for (int r = 0; r < 3000; r++) begin
      con = {$urandom}; busy = 4'($urandom); rnd = 8'($urandom);
      for (int j = 0; j < M; j++) begin
        pri[j] = '0;
        if ($urandom_range(0, 2) == 0) pri[j][$urandom_range(0, N - 1)] = 1'b1;
      end
      #1; verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
