// tb_ks_adder: self-checking test of the 64-bit Kogge-Stone adder.
// Corner cases (zero, all ones, carry rippling across all bits) and random
// operands with random carry-in are compared with the '+' operator.
module tb_ks_adder;
  localparam int unsigned W = 64;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ks_adder #(.W(W)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check();
    logic [W:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", a, b, cin, cout, sum, exp);
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
    a = '0; b = '0; cin = 0; check();
    a = '1; b = '0; cin = 1; check();
    a = '1; b = '1; cin = 1; check();
    a = 64'h8000_0000_0000_0000; b = a; cin = 0; check();
    a = 64'h5555_5555_5555_5555; b = 64'hAAAA_AAAA_AAAA_AAAB; cin = 0; check();
    for (int i = 0; i < W; i++) begin
      a = (64'd1 << i) - 1; b = 64'd1; cin = 0; check();
    end
    repeat (5000) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
