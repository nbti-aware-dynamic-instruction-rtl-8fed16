// tb_nbti_benchmarks: the default 4-wide slice under the integer-ALU load of
// eight SPEC CPU2000 programs. A program itself cannot run on an issue
// slice, so each one is reduced to its integer-ALU demand: IPC times the
// integer share of its instruction mix (gzip 1.90 x 88.27 %, gcc 1.75 x
// 86.65 %, mcf 0.13 x 79.0 %, crafty 2.09 x 88.5 %, twolf 0.80 x 82.98 %,
// applu 1.12 x 17.1 %, fma3d 1.40 x 45.08 %, mesa 2.50 x 72.29 %). Each cycle
// every dispatch lane carries an instruction with probability demand/4;
// instructions the window cannot take wait in the front end. A third of the
// sources read a recent result, the rest are immediate.
// Each program runs 10 000 cycles under PS, 40 000 (four rotation periods)
// under PR and 10 000 under TD. Checked: every result value; PS wear ordered
// ALU0 >= ALU1 >= ALU2 >= ALU3; PR wear within 10 % across ALUs; under TD
// the low-demand mcf keeps up with its demand and programs demanding more
// than 4/3 per cycle fall behind, and TD never stresses any ALU in more
// than 1/(CYCLE_TD+1) of the cycles. Per-ALU stress shares are printed.
module tb_nbti_benchmarks;
  import nbti_pkg::*;
  import nbti_tb_pkg::*;

  localparam int unsigned NUM_ALU = 4, DISP_W = 4, CNT_W = 48, NREG = 8;
  localparam int unsigned NTAG = 1 << TAG_W;
  localparam int unsigned MAXI = 1 << 18;
  localparam int unsigned NBENCH = 8;

  logic               clk = 0, rst_n;
  policy_e            policy;
  logic [DISP_W-1:0]  disp_valid;
  instr_t             disp_instr [DISP_W];
  logic               disp_ready;
  result_t            result [NUM_ALU];
  logic               stats_clear;
  logic [CNT_W-1:0]   stress_cnt [NUM_ALU];
  logic [CNT_W-1:0]   recov_cnt  [NUM_ALU];
  logic [NUM_ALU-1:0] fu_issue, fu_recovering;
  logic [1:0]         prio_offset;
  logic [6:0]         window_count;

  nbti_scheduler dut (
    .clk, .rst_n, .policy, .disp_valid, .disp_instr, .disp_ready, .result,
    .stats_clear, .stress_cnt, .recov_cnt, .fu_issue, .fu_recovering, .prio_offset,
    .window_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(string msg);
    failures++;
    if (failures <= 20) $display("FAIL: %s", msg);
  endtask

  initial begin
    #40_000_000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string bname  [NBENCH] = '{"gzip", "gcc", "mcf", "crafty", "twolf", "applu", "fma3d", "mesa"};
  real   ipc    [NBENCH] = '{1.90, 1.75, 0.13, 2.09, 0.80, 1.12, 1.40, 2.50};
  real   intpct [NBENCH] = '{88.27, 86.65, 79.0, 88.5, 82.98, 17.1, 45.08, 72.29};

  data_t exp_val [MAXI];
  bit    fin     [MAXI];
  int    tag_seq [NTAG];
  int    areg_seq [NREG];
  data_t areg_val [NREG];
  int    nseq = 0, ndone = 0;
  bit    gen_on = 0;
  int    owed = 0;              // instructions waiting in the front end
  int    lane_prob = 0;         // per-lane dispatch probability, per 65536
  longint cyc = 0;

  function automatic src_t make_src(int prod, data_t v);
    if (prod < 0 || fin[prod]) return '{rdy: 1'b1, tag: '0, val: v};
    return '{rdy: 1'b0, tag: tag_t'(prod % NTAG), val: '0};
  endfunction

  function automatic instr_t gen_one();
    instr_t in;
    alu_op_e op = alu_op_e'($urandom_range(7));
    int p1 = -1, p2 = -1, rd;
    data_t v1 = {$urandom, $urandom}, v2 = {$urandom, $urandom};
    if ($urandom_range(2) == 0) begin automatic int r = $urandom_range(NREG - 1); p1 = areg_seq[r]; v1 = areg_val[r]; end
    if ($urandom_range(2) == 0) begin automatic int r = $urandom_range(NREG - 1); p2 = areg_seq[r]; v2 = areg_val[r]; end
    in.op = op; in.dst = tag_t'(nseq % NTAG);
    in.s1 = make_src(p1, v1); in.s2 = make_src(p2, v2);
    exp_val[nseq] = alu_ref(op, v1, v2);
    fin[nseq] = 0;
    tag_seq[nseq % NTAG] = nseq;
    rd = $urandom_range(NREG - 1);
    areg_seq[rd] = nseq; areg_val[rd] = exp_val[nseq];
    nseq++;
    return in;
  endfunction

  always @(negedge clk) if (rst_n) begin
    int k;
    cyc++;
    if (gen_on)
      for (int l = 0; l < DISP_W; l++)
        if ($urandom_range(65535) < lane_prob) owed++;
    disp_valid = '0;
    if (disp_ready) begin
      k = (owed < DISP_W) ? owed : DISP_W;
      for (int l = 0; l < k; l++) begin
        disp_instr[l] = gen_one();
        disp_valid[l] = 1'b1;
      end
      owed -= k;
    end
    for (int f = 0; f < NUM_ALU; f++)
      if (result[f].valid) begin
        automatic int s = tag_seq[result[f].tag];
        checks++;
        if (fin[s] || result[f].val !== exp_val[s]) fail($sformatf("instruction %0d wrong", s));
        fin[s] = 1;
        ndone++;
      end
  end

  // run one program under one policy for n cycles; returns completions
  task automatic run(int b, policy_e p, int n, output longint done_n,
                     output longint st [NUM_ALU], output int backlog);
    int d0;
    @(negedge clk); #1;
    policy = p;
    stats_clear = 1;
    @(negedge clk); #1;
    stats_clear = 0;
    lane_prob = int'(ipc[b] * intpct[b] / 100.0 / DISP_W * 65536.0);
    owed = 0;
    d0 = ndone;
    gen_on = 1;
    repeat (n) @(negedge clk);
    #2;
    for (int f = 0; f < NUM_ALU; f++) st[f] = longint'(stress_cnt[f]);
    done_n = ndone - d0;
    backlog = owed + int'(window_count);
    gen_on = 0;
    // drain before the next run
    wait (owed == 0 && ndone == nseq);
  endtask

  initial begin
    longint n_ps, n_pr, n_td;
    int     b_ps, b_pr, b_td;
    longint s_ps [NUM_ALU], s_pr [NUM_ALU], s_td [NUM_ALU];
    rst_n = 0; policy = POL_PS; stats_clear = 0; disp_valid = '0;
    for (int l = 0; l < DISP_W; l++) disp_instr[l] = '0;
    for (int r = 0; r < NREG; r++) begin areg_seq[r] = -1; areg_val[r] = '0; end
    for (int t = 0; t < NTAG; t++) tag_seq[t] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    $display("program  demand  | PS stress %% ALU0..3     IPC  | PR stress %% ALU0..3     IPC  | TD stress %% ALU0..3     IPC");
    for (int b = 0; b < NBENCH; b++) begin
      run(b, POL_PS, 10000, n_ps, s_ps, b_ps);
      run(b, POL_PR, 40000, n_pr, s_pr, b_pr);
      run(b, POL_TD, 10000, n_td, s_td, b_td);
      $display("%-7s  %5.2f   | %4.1f %4.1f %4.1f %4.1f  %4.2f | %4.1f %4.1f %4.1f %4.1f  %4.2f | %4.1f %4.1f %4.1f %4.1f  %4.2f",
               bname[b], ipc[b] * intpct[b] / 100.0,
               s_ps[0] / 100.0, s_ps[1] / 100.0, s_ps[2] / 100.0, s_ps[3] / 100.0, n_ps / 10000.0,
               s_pr[0] / 400.0, s_pr[1] / 400.0, s_pr[2] / 400.0, s_pr[3] / 400.0, n_pr / 40000.0,
               s_td[0] / 100.0, s_td[1] / 100.0, s_td[2] / 100.0, s_td[3] / 100.0, n_td / 10000.0);
      // PS wears the low-numbered ALUs most
      checks++;
      if (!(s_ps[0] >= s_ps[1] && s_ps[1] >= s_ps[2] && s_ps[2] >= s_ps[3]))
        fail($sformatf("%s: PS wear not ordered", bname[b]));
      // PR balances wear over four rotation periods
      begin
        longint mx, mn;
        mx = 0;
        mn = 1 << 40;
        for (int f = 0; f < NUM_ALU; f++) begin
          if (s_pr[f] > mx) mx = s_pr[f];
          if (s_pr[f] < mn) mn = s_pr[f];
        end
        checks++;
        if (mx > 0 && (mx - mn) * 10 > mx) fail($sformatf("%s: PR wear spread %0d..%0d", bname[b], mn, mx));
      end
      // TD: no ALU is stressed in more than 1/3 of the cycles
      for (int f = 0; f < NUM_ALU; f++) begin
        checks++;
        if (s_td[f] * 3 > 10000 + 3) fail($sformatf("%s: TD ALU%0d stressed %0d cycles", bname[b], f, s_td[f]));
      end
      // TD relieves ALU0 compared with PS
      checks++;
      if (s_td[0] > s_ps[0]) fail($sformatf("%s: TD stresses ALU0 more than PS", bname[b]));
      // low-demand mcf keeps up with its demand under TD (small backlog at
      // the end of the run), while demand above 4/3 per cycle cannot
      if (ipc[b] * intpct[b] / 100.0 > 1.5) begin
        checks++;
        if (b_td < 100) fail($sformatf("%s: TD kept up with a demand above 4/3", bname[b]));
      end
      if (bname[b] == "mcf") begin
        checks++;
        if (b_td > 8) fail($sformatf("mcf falls behind its demand under TD: backlog %0d", b_td));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
