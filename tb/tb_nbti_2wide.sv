// tb_nbti_2wide: the 2-wide core (2 integer ALUs, 2-wide dispatch,
// 32-entry window) with the TD recovery period set to 1, 2 and 3 cycles,
// the three settings compared against PS for that core. Each setting runs
// in its own sched_run instance; independent-stream throughput must be
// exactly 2/(CYCLE_TD+1) per cycle under TD and 2 under PS, and every
// result of a random program must be correct under both policies.
module tb_nbti_2wide;
  logic d1, d2, d3;
  int c1, c2, c3, f1, f2, f3;
  int checks = 0, failures = 0;

  sched_run #(.NUM_ALU(2), .DISP_W(2), .ENTRIES(32), .CYCLE_TD(1)) r1 (.done(d1), .checks(c1), .failures(f1));
  sched_run #(.NUM_ALU(2), .DISP_W(2), .ENTRIES(32), .CYCLE_TD(2)) r2 (.done(d2), .checks(c2), .failures(f2));
  sched_run #(.NUM_ALU(2), .DISP_W(2), .ENTRIES(32), .CYCLE_TD(3)) r3 (.done(d3), .checks(c3), .failures(f3));

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (d1 === 1'b1 && d2 === 1'b1 && d3 === 1'b1);
    checks   = c1 + c2 + c3;
    failures = f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
