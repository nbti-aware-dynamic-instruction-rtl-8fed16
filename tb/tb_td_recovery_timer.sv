// tb_td_recovery_timer: drives random 'used' patterns (only to ALUs that
// are not busy, as the select logic does) and compares 'busy' every cycle
// with a reference model: an ALU used in cycle t is busy in t+1..t+CYCLE_TD.
// Runs CYCLE_TD = 1, 2 (default) and 3, the values the study evaluates, and
// checks that nothing is ever busy under PS and PR.
module tb_td_recovery_timer;
  import nbti_pkg::*;
  localparam int unsigned NFU = 4;
  logic           clk = 0, rst_n;
  policy_e        policy;
  logic [NFU-1:0] used1, used2, used3;
  logic [NFU-1:0] busy1, busy2, busy3;
  int checks = 0, failures = 0;
  int n_busy = 0;

  td_recovery_timer #(.NFU(NFU), .CYCLE_TD(1)) dut1 (.clk, .rst_n, .policy, .used(used1), .busy(busy1));
  td_recovery_timer                          dut2 (.clk, .rst_n, .policy, .used(used2), .busy(busy2));
  td_recovery_timer #(.NFU(NFU), .CYCLE_TD(3)) dut3 (.clk, .rst_n, .policy, .used(used3), .busy(busy3));

  always #5 clk = ~clk;

  // last cycle each ALU was used, per instance
  int last [3][NFU];

  function automatic logic [NFU-1:0] exp_busy(int inst, int cyc, int td);
    logic [NFU-1:0] r = '0;
    for (int f = 0; f < NFU; f++)
      if (policy == POL_TD && last[inst][f] >= 0 && cyc - last[inst][f] <= td) r[f] = 1'b1;
    return r;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(policy_e p, int n, inout int cyc);
    logic [NFU-1:0] e1, e2, e3;
    policy = p;
    for (int i = 0; i < 3; i++) for (int f = 0; f < NFU; f++) last[i][f] = -100;
    @(negedge clk);  // let the policy change clear the counters
    cyc++;
    repeat (n) begin
      @(negedge clk);
      cyc++;
      e1 = exp_busy(0, cyc, 1); e2 = exp_busy(1, cyc, 2); e3 = exp_busy(2, cyc, 3);
      checks++;
      if (busy1 !== e1 || busy2 !== e2 || busy3 !== e3) begin
        failures++;
        if (failures < 10)
          $display("FAIL cyc %0d pol %s busy %b/%b/%b exp %b/%b/%b", cyc, p.name(),
                   busy1, busy2, busy3, e1, e2, e3);
      end
      n_busy += $countones(busy2);
      used1 = NFU'($urandom) & ~e1;
      used2 = NFU'($urandom) & ~e2;
      used3 = NFU'($urandom) & ~e3;
      for (int f = 0; f < NFU; f++) begin
        if (used1[f]) last[0][f] = cyc;
        if (used2[f]) last[1][f] = cyc;
        if (used3[f]) last[2][f] = cyc;
      end
    end
    used1 = '0; used2 = '0; used3 = '0;
  endtask

  initial begin
    automatic int cyc = 0;
    rst_n = 0; policy = POL_PS; used1 = '0; used2 = '0; used3 = '0;
    @(posedge clk); @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(POL_TD, 2000, cyc);
    run(POL_PS, 300, cyc);
    run(POL_PR, 300, cyc);
    run(POL_TD, 500, cyc);
    checks++;
    if (n_busy == 0) begin failures++; $display("FAIL no recovery period seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
