// tb_select_logic: random ready vectors, window heads, busy ALUs and
// priority offsets. The expected grants come from a reference written
// differently from the design: the ready entries are sorted by age
// ((index - head) mod ENTRIES), the free ALUs by priority
// ((alu - offset) mod NFU), and the two lists are paired in order.
// Runs the 4-wide configuration (64 entries, 4 ALUs) and the 2-wide one
// (32 entries, 2 ALUs); each runs in an instance of sel_case.
module tb_select_logic;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one DUT configuration with its own random test loop
  logic done4, done2;
  sel_case #(.ENTRIES(64), .NFU(4)) c4 (.done(done4));
  sel_case #(.ENTRIES(32), .NFU(2)) c2 (.done(done2));

  initial begin
    #1;
    wait (done4 === 1'b1 && done2 === 1'b1);
    checks   = c4.checks + c2.checks;
    failures = c4.failures + c2.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

