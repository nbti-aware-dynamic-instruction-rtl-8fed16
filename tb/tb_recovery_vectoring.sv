// tb_recovery_vectoring: checks that an issued instruction passes to the
// ALU unchanged and that an idle ALU receives the recovery vector (default
// all ones, ADD) and reports that it is recovering. A second instance with
// a non-default vector checks that the parameters take effect.
module tb_recovery_vectoring;
  import nbti_pkg::*;
  logic    valid;
  alu_op_e op_in, op_out, op_out2;
  data_t   a_in, b_in, a_out, b_out, a_out2, b_out2;
  logic    rec, rec2;
  int checks = 0, failures = 0;

  recovery_vectoring dut (.valid, .op_in, .a_in, .b_in,
                          .op_out, .a_out, .b_out, .recovering(rec));
  recovery_vectoring #(.REC_A(64'h0F0F), .REC_B(64'h3), .REC_OP(ALU_XOR)) dut2 (
    .valid, .op_in, .a_in, .b_in, .op_out(op_out2), .a_out(a_out2), .b_out(b_out2),
    .recovering(rec2));

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      valid = 1'($urandom);
      op_in = alu_op_e'($urandom_range(7));
      a_in  = {$urandom, $urandom};
      b_in  = {$urandom, $urandom};
      #1;
      if (valid) begin
        expect_eq("op", 64'(op_out), 64'(op_in));
        expect_eq("a", a_out, a_in);
        expect_eq("b", b_out, b_in);
        expect_eq("rec", 64'(rec), 0);
        expect_eq("a2", a_out2, a_in);
      end else begin
        expect_eq("op idle", 64'(op_out), 64'(ALU_ADD));
        expect_eq("a idle", a_out, '1);
        expect_eq("b idle", b_out, '1);
        expect_eq("rec idle", 64'(rec), 1);
        expect_eq("op2 idle", 64'(op_out2), 64'(ALU_XOR));
        expect_eq("a2 idle", a_out2, 64'h0F0F);
        expect_eq("b2 idle", b_out2, 64'h3);
        expect_eq("rec2 idle", 64'(rec2), 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
