// tb_nbti_scheduler: end-to-end test of the NBTI-aware issue slice at its
// default parameters (4 ALUs, 4-wide dispatch, 64-entry window,
// CYCLE_PR = 10000, CYCLE_TD = 2), no parameter overrides.
//
// A generator plays the part of the front end: it renames a random integer
// program over 8 architectural registers, dispatches it while 'disp_ready'
// allows, and works out every instruction's value in program order. Each
// result that leaves an ALU is checked against that value. Every cycle the
// select decision is checked against the active policy (PS: lowest-numbered
// ALUs; PR: ALUs contiguous from the rotating offset; TD: lowest-numbered
// ALUs that are not recovering, with the recovery periods tracked by the
// testbench), idle ALUs must show the recovery vector, and the stress and
// recovery counters are compared with the testbench's own counts.
// Phases: PS independent stream (rate 4/cycle), PS dependence chain
// (2 cycles per instruction), PS random, PR random over four rotation
// periods (balanced wear), TD independent stream (4 per 3 cycles), TD
// chain, TD random, and a switch back to PS. Mechanisms counted and required
// at least once: dispatch stall, wakeup by broadcast, wakeup at dispatch,
// select contention, priority rotation, TD recovery blocking, recovery
// vectoring, policy switch.
module tb_nbti_scheduler;
  import nbti_pkg::*;
  import nbti_tb_pkg::*;

  localparam int unsigned NUM_ALU = 4, DISP_W = 4, CNT_W = 48;
  localparam int unsigned CYCLE_PR = 10000, CYCLE_TD = 2;
  localparam int unsigned NREG = 8;
  localparam int unsigned MAXI = 1 << 18;
  localparam int unsigned NTAG = 1 << TAG_W;

  logic              clk = 0, rst_n;
  policy_e           policy;
  logic [DISP_W-1:0] disp_valid;
  instr_t            disp_instr [DISP_W];
  logic              disp_ready;
  result_t           result [NUM_ALU];
  logic              stats_clear;
  logic [CNT_W-1:0]  stress_cnt [NUM_ALU];
  logic [CNT_W-1:0]  recov_cnt  [NUM_ALU];
  logic [NUM_ALU-1:0] fu_issue, fu_recovering;
  logic [1:0]        prio_offset;
  logic [6:0]        window_count;

  nbti_scheduler dut (
    .clk, .rst_n, .policy, .disp_valid, .disp_instr, .disp_ready, .result,
    .stats_clear, .stress_cnt, .recov_cnt, .fu_issue, .fu_recovering, .prio_offset,
    .window_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic fail(string msg);
    failures++;
    if (failures <= 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  initial begin
    #5_000_000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- golden program state ----------------
  data_t  exp_val [MAXI];
  bit     done    [MAXI];
  int     tag_seq [NTAG];     // instruction now using each tag
  int     areg_seq [NREG];    // last producer of each register, -1: none
  data_t  areg_val [NREG];
  int     nseq = 0;           // instructions generated
  int     ndone = 0;          // instructions completed
  int     chain_seq = -1;     // previous instruction of a dependence chain

  // mechanism counters
  int n_stall = 0, n_wait_src = 0, n_disp_wake = 0, n_contend = 0, n_rotate = 0;
  int n_td_block = 0, n_vector = 0, n_switch = 0;

  // per-cycle bookkeeping
  longint cyc = 0;
  int     last_use [NUM_ALU];
  longint act_cnt [NUM_ALU];      // testbench stress count since last clear
  longint clr_cyc = 0;            // cycle of the last clear
  longint pr_start = 0;
  logic [1:0] last_off = 0;
  bit     skip_check = 1;

  typedef enum {GEN_NONE, GEN_INDEP, GEN_CHAIN, GEN_RANDOM} gen_e;
  gen_e gen_mode = GEN_NONE;
  int   gen_left = 0;

  // is the result of instruction s on a result bus in this cycle?
  function automatic bit on_bus(int s);
    for (int f = 0; f < NUM_ALU; f++)
      if (result[f].valid && tag_seq[result[f].tag] == s) return 1;
    return 0;
  endfunction

  function automatic src_t make_src(int prod, data_t v);
    if (prod < 0 || done[prod]) return '{rdy: 1'b1, tag: '0, val: v};
    n_wait_src++;
    if (on_bus(prod)) n_disp_wake++;
    return '{rdy: 1'b0, tag: tag_t'(prod % NTAG), val: '0};
  endfunction

  // build one renamed instruction of the current stream
  function automatic instr_t gen_one();
    instr_t  in;
    alu_op_e op = alu_op_e'($urandom_range(7));
    int      p1 = -1, p2 = -1;
    data_t   v1, v2;
    int      rd;
    v1 = {$urandom, $urandom};
    v2 = {$urandom, $urandom};
    case (gen_mode)
      GEN_CHAIN: if (chain_seq >= 0) begin p1 = chain_seq; v1 = exp_val[chain_seq]; end
      GEN_RANDOM: begin
        if ($urandom_range(1)) begin automatic int r = $urandom_range(NREG - 1); p1 = areg_seq[r]; v1 = areg_val[r]; end
        if ($urandom_range(1)) begin automatic int r = $urandom_range(NREG - 1); p2 = areg_seq[r]; v2 = areg_val[r]; end
      end
      default: ;
    endcase
    in.op  = op;
    in.dst = tag_t'(nseq % NTAG);
    in.s1  = make_src(p1, v1);
    in.s2  = make_src(p2, v2);
    exp_val[nseq] = alu_ref(op, v1, v2);
    done[nseq]    = 0;
    tag_seq[nseq % NTAG] = nseq;
    rd = $urandom_range(NREG - 1);
    areg_seq[rd] = nseq;
    areg_val[rd] = exp_val[nseq];
    chain_seq = nseq;
    nseq++;
    return in;
  endfunction

  // ---------------- per-cycle driver and checker ----------------
  always @(negedge clk) if (rst_n) begin
    int k;
    int n_ready, n_avail, n_iss;
    logic [NUM_ALU-1:0] rot, exp_rec;
    cyc++;

    // select checks for this cycle
    n_ready = $countones(dut.ready);
    n_avail = NUM_ALU - $countones(fu_recovering);
    n_iss   = $countones(fu_issue);
    if (!skip_check) begin
      checks++;
      if (n_iss != ((n_ready < n_avail) ? n_ready : n_avail))
        fail($sformatf("issued %0d, ready %0d, available %0d", n_iss, n_ready, n_avail));
      if (n_ready > n_avail) n_contend++;
      case (policy)
        POL_PS: begin
          checks++;
          if (fu_issue != NUM_ALU'((1 << n_iss) - 1) || fu_recovering != '0 || prio_offset != 0)
            fail($sformatf("PS issue pattern %b", fu_issue));
        end
        POL_PR: begin
          rot = NUM_ALU'({fu_issue, fu_issue} >> prio_offset);
          checks++;
          if (rot != NUM_ALU'((1 << n_iss) - 1) || fu_recovering != '0)
            fail($sformatf("PR issue pattern %b offset %0d", fu_issue, prio_offset));
          if (prio_offset != last_off) begin
            n_rotate++;
            checks++;
            if ((cyc - pr_start) % CYCLE_PR != 0 || prio_offset != 2'(last_off + 1))
              fail($sformatf("rotation at cycle %0d of PR, offset %0d", cyc - pr_start, prio_offset));
          end
        end
        POL_TD: begin
          exp_rec = '0;
          for (int f = 0; f < NUM_ALU; f++)
            if (cyc - last_use[f] <= CYCLE_TD) exp_rec[f] = 1'b1;
          checks++;
          if (fu_recovering != exp_rec)
            fail($sformatf("TD recovering %b expected %b", fu_recovering, exp_rec));
          // the issued ALUs are the lowest-numbered free ones
          k = 0;
          for (int f = 0; f < NUM_ALU; f++)
            if (!fu_recovering[f]) begin
              checks++;
              if (fu_issue[f] != (k < n_iss)) fail($sformatf("TD issue pattern %b rec %b", fu_issue, fu_recovering));
              k++;
            end else if (fu_issue[f]) fail("TD issued to a recovering ALU");
          if (fu_recovering != '0 && n_ready > n_iss) n_td_block++;
        end
        default: ;
      endcase
    end
    for (int f = 0; f < NUM_ALU; f++) if (fu_issue[f]) last_use[f] = int'(cyc);
    last_off = prio_offset;

    // dispatch for this cycle, generated before this cycle's results are seen
    disp_valid = '0;
    if (gen_left > 0) begin
      if (!disp_ready) n_stall++;
      else begin
        k = (gen_mode == GEN_RANDOM) ? $urandom_range(DISP_W) :
            (gen_mode == GEN_CHAIN)  ? 1 : DISP_W;
        if (k > gen_left) k = gen_left;
        for (int l = 0; l < k; l++) begin
          disp_instr[l] = gen_one();
          disp_valid[l] = 1'b1;
        end
        gen_left -= k;
      end
    end

    // results of this cycle
    for (int f = 0; f < NUM_ALU; f++) begin
      if (result[f].valid) begin
        automatic int s = tag_seq[result[f].tag];
        act_cnt[f]++;
        checks++;
        if (done[s]) fail($sformatf("instruction %0d completed twice", s));
        else if (result[f].val !== exp_val[s])
          fail($sformatf("instruction %0d: value %h expected %h", s, result[f].val, exp_val[s]));
        done[s] = 1;
        ndone++;
      end else begin
        n_vector++;
        checks++;
        if (result[f].val !== 64'hFFFF_FFFF_FFFF_FFFE)
          fail($sformatf("idle ALU%0d not on the recovery vector: %h", f, result[f].val));
      end
    end
    skip_check = 0;
  end

  // ---------------- phase control ----------------
  task automatic set_policy(policy_e p);
    @(negedge clk);
    #1;
    if (p != policy) n_switch++;
    policy = p;
    skip_check = 1;   // the first cycle after a switch still has the old state
    if (p == POL_PR) begin pr_start = cyc; last_off = 0; end
  endtask

  // run a stream of n instructions and wait until all have completed;
  // returns the cycles from the first dispatch to the last result
  task automatic stream(gen_e m, int n, output longint cycles);
    longint t0;
    @(negedge clk);
    #1;
    gen_mode = m; gen_left = n; chain_seq = -1;
    t0 = cyc;
    wait (gen_left == 0 && ndone == nseq);
    cycles = cyc - t0;
    gen_mode = GEN_NONE;
  endtask

  task automatic clear_stats();
    @(negedge clk);
    #1;
    stats_clear = 1;
    @(negedge clk);
    #1;
    stats_clear = 0;
    for (int f = 0; f < NUM_ALU; f++) act_cnt[f] = 0;
    clr_cyc = cyc;
  endtask

  // compare the hardware counters with the testbench's counts
  task automatic check_stats(string phase);
    @(negedge clk);
    #2;
    for (int f = 0; f < NUM_ALU; f++) begin
      checks++;
      if (stress_cnt[f] != CNT_W'(act_cnt[f]) ||
          stress_cnt[f] + recov_cnt[f] != CNT_W'(cyc - clr_cyc))
        fail($sformatf("%s ALU%0d stress %0d/%0d, stress+recovery %0d, cycles %0d", phase, f,
                       stress_cnt[f], act_cnt[f], stress_cnt[f] + recov_cnt[f], cyc - clr_cyc));
    end
    $display("%-14s stress ALU0..3 = %0d %0d %0d %0d", phase,
             stress_cnt[0], stress_cnt[1], stress_cnt[2], stress_cnt[3]);
  endtask

  task automatic expect_range(string what, longint v, longint lo, longint hi);
    checks++;
    if (v < lo || v > hi) fail($sformatf("%s = %0d, expected %0d..%0d", what, v, lo, hi));
    else $display("%-28s %0d (expected %0d..%0d)", what, v, lo, hi);
  endtask

  initial begin
    longint c;
    rst_n = 0; policy = POL_PS; stats_clear = 0; disp_valid = '0;
    for (int l = 0; l < DISP_W; l++) disp_instr[l] = '0;
    for (int r = 0; r < NREG; r++) begin areg_seq[r] = -1; areg_val[r] = '0; end
    for (int t = 0; t < NTAG; t++) tag_seq[t] = 0;
    for (int f = 0; f < NUM_ALU; f++) begin last_use[f] = -100; act_cnt[f] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // PS: independent instructions issue 4 per cycle on all ALUs
    stream(GEN_INDEP, 4000, c);
    expect_range("PS independent, cycles", c, 1000, 1006);
    // PS: a dependence chain issues one instruction every 2 cycles on ALU0
    clear_stats();
    stream(GEN_CHAIN, 300, c);
    expect_range("PS chain, cycles", c, 600, 605);
    check_stats("PS chain");
    checks++;
    if (stress_cnt[0] != 300 || stress_cnt[1] != 0) fail("PS chain did not run on ALU0 alone");
    // PS random: wear falls from ALU0 to ALU3
    clear_stats();
    stream(GEN_RANDOM, 20000, c);
    check_stats("PS random");
    checks++;
    if (!(stress_cnt[0] > stress_cnt[1] && stress_cnt[1] > stress_cnt[2] && stress_cnt[2] > stress_cnt[3]))
      fail("PS wear is not ordered ALU0 > ALU1 > ALU2 > ALU3");

    // PR random over four full rotation periods: wear is balanced
    set_policy(POL_PR);
    clear_stats();
    @(negedge clk);
    #1;
    gen_mode = GEN_RANDOM; gen_left = 1 << 30; chain_seq = -1;
    wait (cyc - pr_start >= 4 * CYCLE_PR);
    gen_left = 0;
    wait (ndone == nseq);
    gen_mode = GEN_NONE;
    check_stats("PR random");
    begin
      longint mx = 0, mn = 1 << 40;
      for (int f = 0; f < NUM_ALU; f++) begin
        if (stress_cnt[f] > mx) mx = stress_cnt[f];
        if (stress_cnt[f] < mn) mn = stress_cnt[f];
      end
      expect_range("PR wear spread, permille", (mx - mn) * 1000 / mx, 0, 60);
    end
    expect_range("PR rotations", n_rotate, 4, 5);

    // TD: every ALU is usable once per CYCLE_TD+1 cycles
    set_policy(POL_TD);
    clear_stats();
    stream(GEN_INDEP, 3000, c);
    expect_range("TD independent, cycles", c, 2250, 2256);
    check_stats("TD indep");
    stream(GEN_CHAIN, 300, c);
    expect_range("TD chain, cycles", c, 600, 605);
    clear_stats();
    stream(GEN_RANDOM, 20000, c);
    check_stats("TD random");

    // back to the baseline
    set_policy(POL_PS);
    stream(GEN_RANDOM, 5000, c);

    // every mechanism must have happened
    expect_range("dispatch stalls", n_stall, 1, 1 << 30);
    expect_range("sources woken by broadcast", n_wait_src, 1, 1 << 30);
    expect_range("wakeups at dispatch", n_disp_wake, 1, 1 << 30);
    expect_range("select contention cycles", n_contend, 1, 1 << 30);
    expect_range("TD recovery blocking cycles", n_td_block, 1, 1 << 30);
    expect_range("idle ALU cycles vectored", n_vector, 1, 1 << 30);
    expect_range("policy switches", n_switch, 3, 3);
    expect_range("instructions completed", ndone, nseq, nseq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
