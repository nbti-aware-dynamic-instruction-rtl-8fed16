// tb_issue_window: directed test of the issue window at its default size
// (64 entries, 4-wide dispatch, 4 broadcast buses, 4 read ports).
//  1. dispatch four instructions, some waiting on tags; only the one with
//     both sources present is ready;
//  2. a broadcast wakes the waiting sources and their values are captured;
//  3. a broadcast in the same cycle as a dispatch wakes the new instruction;
//  4. issued entries stop being ready and are released in order from head;
//  5. the window fills, 'disp_ready' drops and dispatch is refused;
//  6. issuing everything drains it at 4 entries per cycle.
module tb_issue_window;
  import nbti_pkg::*;
  localparam int unsigned ENTRIES = 64, DISP_W = 4, NBC = 4, NRD = 4;
  logic               clk = 0, rst_n;
  logic [DISP_W-1:0]  disp_valid;
  instr_t             disp_instr [DISP_W];
  logic               disp_ready;
  result_t            bcast [NBC];
  logic [ENTRIES-1:0] ready, iss_mask;
  logic [5:0]         head;
  logic [5:0]         rd_idx [NRD];
  instr_t             rd_instr [NRD];
  logic [6:0]         count;
  int checks = 0, failures = 0;

  issue_window dut (.clk, .rst_n, .disp_valid, .disp_instr, .disp_ready, .bcast,
                    .ready, .head, .iss_mask, .rd_idx, .rd_instr, .count);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic src_t val(data_t v);
    return '{rdy: 1'b1, tag: '0, val: v};
  endfunction
  function automatic src_t wait_on(int t);
    return '{rdy: 1'b0, tag: tag_t'(t), val: '0};
  endfunction
  function automatic instr_t mk(int dst, src_t a, src_t b);
    return '{op: ALU_ADD, dst: tag_t'(dst), s1: a, s2: b};
  endfunction

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic idle_inputs();
    disp_valid = '0;
    for (int i = 0; i < NBC; i++) bcast[i] = '0;
    iss_mask = '0;
  endtask

  task automatic next();
    @(negedge clk);
    idle_inputs();
  endtask

  initial begin
    rst_n = 0;
    for (int l = 0; l < DISP_W; l++) disp_instr[l] = '0;
    for (int r = 0; r < NRD; r++) rd_idx[r] = '0;
    idle_inputs();
    @(posedge clk); @(posedge clk);
    @(negedge clk) rst_n = 1;
    expect_eq("count after reset", 64'(count), 0);
    expect_eq("disp_ready after reset", 64'(disp_ready), 1);

    // 1. dispatch
    disp_valid    = 4'b1111;
    disp_instr[0] = mk(10, val(64'd1), val(64'd2));
    disp_instr[1] = mk(11, wait_on(5), val(64'd3));
    disp_instr[2] = mk(12, val(64'd4), wait_on(6));
    disp_instr[3] = mk(13, wait_on(5), wait_on(6));
    next();
    expect_eq("count 4", 64'(count), 4);
    expect_eq("ready 1", 64'(ready), 64'b0001);

    // 2. wakeup of tag 5 on bus 2
    bcast[2] = '{valid: 1'b1, tag: tag_t'(5), val: 64'hAAAA};
    next();
    expect_eq("ready 2", 64'(ready), 64'b0011);
    rd_idx[0] = 6'd1; rd_idx[1] = 6'd3;
    #1;
    expect_eq("captured value", rd_instr[0].s1.val, 64'hAAAA);
    expect_eq("captured in waiting entry", rd_instr[1].s1.val, 64'hAAAA);
    expect_eq("other source still waiting", 64'(rd_instr[1].s2.rdy), 0);

    // 3. tag 6 broadcast while an instruction waiting on it is dispatched
    bcast[0] = '{valid: 1'b1, tag: tag_t'(6), val: 64'hBBBB};
    disp_valid = 4'b0010;   // lane 1 only: packed into the next free slot
    disp_instr[1] = mk(14, wait_on(6), val(64'd7));
    next();
    expect_eq("count 5", 64'(count), 5);
    expect_eq("ready 3", 64'(ready), 64'b11111);
    rd_idx[2] = 6'd4; rd_idx[3] = 6'd2;
    #1;
    expect_eq("dispatch-time wakeup", rd_instr[2].s1.val, 64'hBBBB);
    expect_eq("dispatch-time wakeup dst", 64'(rd_instr[2].dst), 14);
    expect_eq("wakeup s2", rd_instr[3].s2.val, 64'hBBBB);

    // 4. issue entries 0 and 2
    iss_mask = 64'b00101;
    next();
    expect_eq("ready after issue", 64'(ready), 64'b11010);
    expect_eq("head before release", 64'(head), 0);
    next();
    expect_eq("head after release", 64'(head), 1);
    expect_eq("count after release", 64'(count), 4);
    iss_mask = 64'b01010;  // entries 1 and 3
    next();
    next();
    // entries 1,2,3 are now issued and leave together
    expect_eq("head in order", 64'(head), 4);
    expect_eq("count in order", 64'(count), 1);

    // 5. fill the window
    begin
      automatic int n = 0;
      while (disp_ready) begin
        disp_valid = 4'b1111;
        for (int l = 0; l < DISP_W; l++) disp_instr[l] = mk(20 + l, val(64'(n)), val(64'd1));
        n++;
        next();
      end
      expect_eq("full count", 64'(count), 61);
      disp_valid = 4'b1111;
      next();
      expect_eq("dispatch refused when full", 64'(count), 61);
      expect_eq("disp_ready low", 64'(disp_ready), 0);
    end

    // 6. issue everything and drain
    iss_mask = ready;
    next();
    expect_eq("nothing ready after issuing all", 64'(ready), 0);
    for (int c = 0; c < 16; c++) begin
      next();
      expect_eq("drain rate", 64'(count), (c < 15) ? 61 - 4 * (c + 1) : 0);
    end
    expect_eq("disp_ready after drain", 64'(disp_ready), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
