// tb_alu_unit: drives random issue/idle cycles into one ALU slot and checks
// that each issued instruction's result and tag appear exactly one cycle
// later, that an idle cycle gives no valid result and 'active' low, and that
// an idle ALU computes on the recovery vector (all ones + all ones).
module tb_alu_unit;
  import nbti_pkg::*;
  import nbti_tb_pkg::*;
  logic    clk = 0, rst_n;
  logic    iss_valid;
  alu_op_e iss_op;
  data_t   iss_a, iss_b;
  tag_t    iss_tag;
  result_t res;
  logic    active;
  int checks = 0, failures = 0;
  logic    exp_valid;
  data_t   exp_val;
  tag_t    exp_tag;
  int      n_idle = 0, n_busy = 0;

  alu_unit dut (.clk, .rst_n, .iss_valid, .iss_op, .iss_a, .iss_b, .iss_tag, .res, .active);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; iss_valid = 0; iss_op = ALU_ADD; iss_a = 0; iss_b = 0; iss_tag = 0;
    @(posedge clk); @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_valid = 0; exp_val = '0; exp_tag = '0;
    repeat (3000) begin
      @(negedge clk);
      // check the cycle that follows the previous issue decision
      checks++;
      if (res.valid !== exp_valid || active !== exp_valid) begin
        failures++;
        $display("FAIL valid: got %b/%b exp %b", res.valid, active, exp_valid);
      end
      if (exp_valid) begin
        n_busy++;
        checks++;
        if (res.val !== exp_val || res.tag !== exp_tag) begin
          failures++;
          $display("FAIL result: got %h/%0d exp %h/%0d", res.val, res.tag, exp_val, exp_tag);
        end
      end else begin
        n_idle++;
        checks++;
        if (res.val !== 64'hFFFF_FFFF_FFFF_FFFE) begin
          failures++;
          $display("FAIL idle ALU not on recovery vector: %h", res.val);
        end
      end
      iss_valid = 1'($urandom);
      iss_op    = alu_op_e'($urandom_range(7));
      iss_a     = {$urandom, $urandom};
      iss_b     = {$urandom, $urandom};
      iss_tag   = tag_t'($urandom);
      exp_valid = iss_valid;
      exp_val   = alu_ref(iss_op, iss_a, iss_b);
      exp_tag   = iss_tag;
    end
    if (n_idle == 0 || n_busy == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
