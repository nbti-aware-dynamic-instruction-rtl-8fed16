// tb_priority_rotator: runs the rotator at its default period of 10000
// cycles. Under PR the offset must step 0,1,2,3,0,... exactly every 10000
// cycles with 'rotate' high in the last cycle of each period; under PS and
// TD it must be 0 and a return to PR must start a full new period. A second
// instance with NFU = 2 and a 3-cycle period checks the wrap at two ALUs.
module tb_priority_rotator;
  import nbti_pkg::*;
  localparam int unsigned PERIOD = 10000;
  logic        clk = 0, rst_n;
  policy_e     policy;
  logic [1:0]  offset;
  logic        rotate;
  logic [0:0]  offset2;
  logic        rotate2;
  int checks = 0, failures = 0;
  int exp_off, exp_cnt, exp_off2, exp_cnt2, n_rot = 0;

  priority_rotator dut (.clk, .rst_n, .policy, .offset, .rotate);
  priority_rotator #(.NFU(2), .CYCLE_PR(3)) dut2 (.clk, .rst_n, .policy,
                                                   .offset(offset2), .rotate(rotate2));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    @(negedge clk);
    // reference model, advanced over the edge just taken
    if (policy != POL_PR) begin
      exp_off = 0; exp_cnt = 0; exp_off2 = 0; exp_cnt2 = 0;
    end else begin
      if (exp_cnt == PERIOD - 1) begin exp_cnt = 0; exp_off = (exp_off + 1) % 4; end
      else exp_cnt++;
      if (exp_cnt2 == 2) begin exp_cnt2 = 0; exp_off2 = (exp_off2 + 1) % 2; end
      else exp_cnt2++;
    end
    checks++;
    if (offset !== 2'(exp_off) || rotate !== (policy == POL_PR && exp_cnt == PERIOD - 1) ||
        offset2 !== 1'(exp_off2) || rotate2 !== (policy == POL_PR && exp_cnt2 == 2)) begin
      failures++;
      if (failures < 10)
        $display("FAIL pol=%s off=%0d/%0d rot=%b exp off=%0d cnt=%0d", policy.name(),
                 offset, offset2, rotate, exp_off, exp_cnt);
    end
    if (rotate) n_rot++;
  endtask

  initial begin
    rst_n = 0; policy = POL_PR;
    exp_off = 0; exp_cnt = 0; exp_off2 = 0; exp_cnt2 = 0;
    @(posedge clk); @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5 * PERIOD + 17) step_and_check();
    policy = POL_PS;
    repeat (100) step_and_check();
    policy = POL_PR;
    repeat (PERIOD + 5) step_and_check();
    policy = POL_TD;
    repeat (50) step_and_check();
    checks++;
    if (n_rot != 6) begin
      failures++;
      $display("FAIL expected 6 rotations, saw %0d", n_rot);
    end
    $display("rotations=%0d", n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
