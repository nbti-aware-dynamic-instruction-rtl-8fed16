// tb_int_alu: self-checking test of the integer ALU. Every operation is
// applied to corner values (0, 1, -1, most negative, most positive) and to
// random operands; results are compared with the reference function of
// nbti_tb_pkg, which uses plain SystemVerilog operators.
module tb_int_alu;
  import nbti_pkg::*;
  import nbti_tb_pkg::*;
  alu_op_e op;
  data_t   a, b, y;
  int checks = 0, failures = 0;
  data_t corner [5] = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000, 64'h7FFF_FFFF_FFFF_FFFF};

  int_alu dut (.op, .a, .b, .y);

  task automatic check();
    data_t exp;
    #1;
    exp = alu_ref(op, a, b);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h exp %h", op.name(), a, b, y, exp);
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
    for (int o = 0; o < 8; o++)
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          op = alu_op_e'(o); a = corner[i]; b = corner[j]; check();
        end
    repeat (4000) begin
      op = alu_op_e'($urandom_range(7));
      a = {$urandom, $urandom};
      b = ($urandom_range(3) == 0) ? a : {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
