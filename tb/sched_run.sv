// sched_run: one configuration of the NBTI-aware issue slice driven by a
// small front-end model. It runs five streams, each to completion:
// independent instructions under PS and under TD (the cycle counts must be
// N/NUM_ALU and N*(CYCLE_TD+1)/NUM_ALU), and the same random renamed
// program under PS and TD, with every result value checked, then a longer
// random program under PR whose wear must be balanced over the ALUs. It prints the
// throughput of each and raises 'done'. Used by tb_nbti_2wide.
module sched_run
  import nbti_pkg::*;
  import nbti_tb_pkg::*;
#(
  parameter int unsigned NUM_ALU  = 2,
  parameter int unsigned DISP_W   = 2,
  parameter int unsigned ENTRIES  = 32,
  parameter int unsigned CYCLE_TD = 2,
  parameter int unsigned N_INDEP  = 2000,
  parameter int unsigned N_RAND   = 6000,
  parameter int unsigned N_PR     = 22000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NREG = 8;
  localparam int unsigned NTAG = 1 << TAG_W;
  localparam int unsigned MAXI = 1 << 16;
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned OFF_W = (NUM_ALU > 1) ? $clog2(NUM_ALU) : 1;

  logic               clk = 0, rst_n;
  policy_e            policy;
  logic [DISP_W-1:0]  disp_valid;
  instr_t             disp_instr [DISP_W];
  logic               disp_ready;
  result_t            result [NUM_ALU];
  logic [47:0]        stress_cnt [NUM_ALU];
  logic [47:0]        recov_cnt  [NUM_ALU];
  logic [NUM_ALU-1:0] fu_issue, fu_recovering;
  logic [OFF_W-1:0]   prio_offset;
  logic [IDX_W:0]     window_count;

  nbti_scheduler #(.NUM_ALU(NUM_ALU), .DISP_W(DISP_W), .ENTRIES(ENTRIES),
                   .CYCLE_TD(CYCLE_TD)) dut (
    .clk, .rst_n, .policy, .disp_valid, .disp_instr, .disp_ready, .result,
    .stats_clear(1'b0), .stress_cnt, .recov_cnt, .fu_issue, .fu_recovering,
    .prio_offset, .window_count);

  always #5 clk = ~clk;

  data_t exp_val [MAXI];
  bit    fin     [MAXI];
  int    tag_seq [NTAG];
  int    areg_seq [NREG];
  data_t areg_val [NREG];
  int    nseq, ndone, gen_left;
  bit    random_mode;
  longint cyc;
  // the random program is replayed identically under each policy
  int unsigned seed_op [MAXI];

  function automatic src_t make_src(int prod, data_t v);
    if (prod < 0 || fin[prod]) return '{rdy: 1'b1, tag: '0, val: v};
    return '{rdy: 1'b0, tag: tag_t'(prod % NTAG), val: '0};
  endfunction

  function automatic instr_t gen_one(int i);
    instr_t in;
    int unsigned r = seed_op[i];
    alu_op_e op = alu_op_e'(r[2:0]);
    int p1 = -1, p2 = -1, rd;
    data_t v1 = data_t'(r) * 64'h9E37_79B9_7F4A_7C15;
    data_t v2 = data_t'(~r) * 64'hC2B2_AE3D_27D4_EB4F;
    if (random_mode) begin
      if (r[3]) begin p1 = areg_seq[r[6:4]]; v1 = areg_val[r[6:4]]; end
      if (r[7]) begin p2 = areg_seq[r[10:8]]; v2 = areg_val[r[10:8]]; end
    end
    in.op = op;
    in.dst = tag_t'(nseq % NTAG);
    in.s1 = make_src(p1, v1);
    in.s2 = make_src(p2, v2);
    exp_val[nseq] = alu_ref(op, v1, v2);
    fin[nseq] = 0;
    tag_seq[nseq % NTAG] = nseq;
    rd = int'(r[13:11]);
    areg_seq[rd] = nseq;
    areg_val[rd] = exp_val[nseq];
    nseq++;
    return in;
  endfunction

  int base;  // index of the stream's first instruction in seed_op
  always @(negedge clk) if (rst_n) begin
    int k;
    cyc++;
    disp_valid = '0;
    if (gen_left > 0 && disp_ready) begin
      k = random_mode ? int'($urandom_range(DISP_W)) : DISP_W;
      if (k > gen_left) k = gen_left;
      for (int l = 0; l < k; l++) begin
        disp_instr[l] = gen_one(nseq - base);
        disp_valid[l] = 1'b1;
      end
      gen_left -= k;
    end
    for (int f = 0; f < NUM_ALU; f++)
      if (result[f].valid) begin
        automatic int s = tag_seq[result[f].tag];
        checks++;
        if (fin[s] || result[f].val !== exp_val[s]) begin
          failures++;
          $display("FAIL %0d-wide TD%0d: instruction %0d", NUM_ALU, CYCLE_TD, s);
        end
        fin[s] = 1;
        ndone++;
      end
  end

  task automatic run(policy_e p, bit rnd, int n, output longint cycles);
    longint t0;
    @(negedge clk);
    #1;
    policy = p;
    @(negedge clk);
    #1;
    for (int r = 0; r < NREG; r++) begin areg_seq[r] = -1; areg_val[r] = data_t'(r); end
    random_mode = rnd; base = nseq; gen_left = n; t0 = cyc;
    wait (gen_left == 0 && ndone == nseq);
    cycles = cyc - t0;
  endtask

  task automatic expect_range(string what, longint v, longint lo, longint hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %0d-wide CYCLE_TD=%0d %s = %0d, expected %0d..%0d", NUM_ALU, CYCLE_TD, what, v, lo, hi);
    end
  endtask

  initial begin
    longint c_ps, c_td, r_ps, r_td, pr_bal;
    done = 0; checks = 0; failures = 0;
    nseq = 0; ndone = 0; gen_left = 0; cyc = 0; random_mode = 0; base = 0;
    rst_n = 0; policy = POL_PS; disp_valid = '0;
    for (int l = 0; l < DISP_W; l++) disp_instr[l] = '0;
    for (int i = 0; i < MAXI; i++) seed_op[i] = $urandom;
    for (int t = 0; t < NTAG; t++) tag_seq[t] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(POL_PS, 0, N_INDEP, c_ps);
    run(POL_TD, 0, N_INDEP, c_td);
    expect_range("PS independent cycles", c_ps, N_INDEP / NUM_ALU - 1, N_INDEP / NUM_ALU + 6);
    expect_range("TD independent cycles", c_td, N_INDEP * (CYCLE_TD + 1) / NUM_ALU - CYCLE_TD - 1,
                 N_INDEP * (CYCLE_TD + 1) / NUM_ALU + 6);
    run(POL_PS, 1, N_RAND, r_ps);
    run(POL_TD, 1, N_RAND, r_td);
    expect_range("TD random no faster than PS", r_td, r_ps, r_ps * (CYCLE_TD + 1));
    // PR over about two rotation periods (CYCLE_PR = 10000) balances the ALUs
    begin
      longint a0, a1, c_pr;
      a0 = longint'(stress_cnt[0]); a1 = longint'(stress_cnt[1]);
      run(POL_PR, 1, N_PR, c_pr);
      a0 = longint'(stress_cnt[0]) - a0; a1 = longint'(stress_cnt[1]) - a1;
      expect_range("PR cycles", c_pr, 20000, 24000);
      expect_range("PR wear difference ALU0-ALU1, permille", (a0 - a1) * 1000 / (a0 + a1), -60, 60);
      pr_bal = (a0 - a1) * 1000 / (a0 + a1);
    end
    $display("%0d-wide, CYCLE_TD=%0d: independent IPC PS %0.2f TD %0.2f; random program IPC PS %0.2f TD %0.2f (%0.0f%% of PS); PR wear imbalance %0d permille",
             NUM_ALU, CYCLE_TD, real'(N_INDEP) / c_ps, real'(N_INDEP) / c_td,
             real'(N_RAND) / r_ps, real'(N_RAND) / r_td, 100.0 * r_ps / r_td,
             pr_bal);
    done = 1;
  end
endmodule
