// tb_stress_monitor: random per-ALU activity; the stress and recovery
// counters of every ALU are compared each cycle with counts kept by the
// testbench, including a clear in the middle of the run.
module tb_stress_monitor;
  localparam int unsigned NFU = 4, CNT_W = 48;
  logic             clk = 0, rst_n, clear;
  logic [NFU-1:0]   active;
  logic [CNT_W-1:0] stress_cnt [NFU];
  logic [CNT_W-1:0] recov_cnt  [NFU];
  longint           es [NFU], er [NFU];
  int checks = 0, failures = 0;

  stress_monitor dut (.clk, .rst_n, .clear, .active, .stress_cnt, .recov_cnt);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; active = '0;
    for (int f = 0; f < NFU; f++) begin es[f] = 0; er[f] = 0; end
    @(posedge clk); @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      // check the counters after the previous edge
      for (int f = 0; f < NFU; f++) begin
        checks++;
        if (stress_cnt[f] !== CNT_W'(es[f]) || recov_cnt[f] !== CNT_W'(er[f])) begin
          failures++;
          if (failures < 10)
            $display("FAIL alu%0d stress %0d/%0d recov %0d/%0d", f, stress_cnt[f], es[f],
                     recov_cnt[f], er[f]);
        end
      end
      clear  = (c == 1500);
      // ALU f busy with probability (f+1)/5, as under prioritized select
      for (int f = 0; f < NFU; f++) active[f] = ($urandom_range(4) <= 3 - f);
      for (int f = 0; f < NFU; f++) begin
        if (clear) begin es[f] = 0; er[f] = 0; end
        else if (active[f]) es[f]++;
        else er[f]++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
