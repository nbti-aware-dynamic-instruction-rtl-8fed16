// nbti_scheduler: NBTI-aware dynamic instruction scheduler for the integer
// ALUs of a superscalar core (top level).
//
// PMOS transistors age (NBTI) while their gates are held low and partly
// recover while held high. A conventional select always prefers the
// lowest-numbered free ALU, so ALU0 is stressed most and wears out first.
// This slice keeps the conventional wakeup/select structure and lets the
// assignment of instructions to ALUs follow one of three run-time policies:
//   PS  prioritized scheduling, ALU0 highest priority (baseline);
//   PR  priority rotation: the highest priority moves to the next ALU every
//       CYCLE_PR cycles, balancing wear;
//   TD  time-dependent: an ALU used in one cycle is kept busy for the next
//       CYCLE_TD cycles, forcing a recovery period after every use.
// Idle ALUs always receive a recovery input vector.
//
// Structure: issue_window (storage, tag-broadcast wakeup) -> select_logic
// (oldest-first pick, ALU assignment in priority order from
// priority_rotator, recovering ALUs masked by td_recovery_timer) ->
// NUM_ALU alu_unit slots (input vectoring, operand register, Kogge-Stone
// ALU) -> results broadcast back to the window and out on 'result';
// stress_monitor counts stress and recovery cycles of every ALU.
//
// Interface and timing: up to DISP_W instructions are dispatched per cycle
// while 'disp_ready' is high. An instruction issued in cycle t is executed
// in t+1, when its result appears on 'result' and is broadcast; a consumer
// can issue in t+2. 'fu_issue', 'fu_recovering' and 'prio_offset' show the
// select decision of the current cycle. Reset is synchronous, active low.
// Defaults are the 4-wide core of the study (4 integer ALUs, 4-wide
// dispatch, 64-entry window, CYCLE_PR = 10000, CYCLE_TD = 2); the 2-wide
// core is NUM_ALU = 2, DISP_W = 2, ENTRIES = 32. The data-capture window,
// one-cycle ALU, in-order release and status ports are this design's
// choices.
module nbti_scheduler
  import nbti_pkg::*;
#(
  parameter int unsigned NUM_ALU  = 4,
  parameter int unsigned DISP_W   = 4,
  parameter int unsigned ENTRIES  = 64,
  parameter int unsigned CYCLE_PR = 10000,
  parameter int unsigned CYCLE_TD = 2,
  parameter int unsigned CNT_W    = 48,
  localparam int unsigned IDX_W   = $clog2(ENTRIES),
  localparam int unsigned OFF_W   = (NUM_ALU > 1) ? $clog2(NUM_ALU) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  policy_e          policy,
  // dispatch from rename
  input  logic [DISP_W-1:0] disp_valid,
  input  instr_t           disp_instr [DISP_W],
  output logic             disp_ready,
  // results, one bus per ALU
  output result_t          result [NUM_ALU],
  // NBTI statistics
  input  logic             stats_clear,
  output logic [CNT_W-1:0] stress_cnt [NUM_ALU],
  output logic [CNT_W-1:0] recov_cnt  [NUM_ALU],
  // select status of the current cycle
  output logic [NUM_ALU-1:0] fu_issue,
  output logic [NUM_ALU-1:0] fu_recovering,
  output logic [OFF_W-1:0]   prio_offset,
  output logic [IDX_W:0]     window_count
);
  logic [ENTRIES-1:0] ready;
  logic [IDX_W-1:0]   head;
  logic [ENTRIES-1:0] iss_mask;
  logic [IDX_W-1:0]   grant_idx [NUM_ALU];
  instr_t             iss_instr [NUM_ALU];
  logic [NUM_ALU-1:0] grant;
  logic [NUM_ALU-1:0] td_busy;
  logic [NUM_ALU-1:0] active;
  logic               rotate_unused;

  issue_window #(
    .ENTRIES(ENTRIES), .DISP_W(DISP_W), .NBC(NUM_ALU), .NRD(NUM_ALU)
  ) u_window (
    .clk, .rst_n,
    .disp_valid, .disp_instr, .disp_ready,
    .bcast   (result),
    .ready, .head, .iss_mask,
    .rd_idx  (grant_idx),
    .rd_instr(iss_instr),
    .count   (window_count)
  );

  priority_rotator #(.NFU(NUM_ALU), .CYCLE_PR(CYCLE_PR)) u_rot (
    .clk, .rst_n, .policy,
    .offset(prio_offset),
    .rotate(rotate_unused)
  );

  td_recovery_timer #(.NFU(NUM_ALU), .CYCLE_TD(CYCLE_TD)) u_td (
    .clk, .rst_n, .policy,
    .used(grant),
    .busy(td_busy)
  );

  select_logic #(.ENTRIES(ENTRIES), .NFU(NUM_ALU)) u_sel (
    .ready, .head,
    .fu_busy   (td_busy),
    .offset    (prio_offset),
    .grant,
    .grant_idx,
    .issue_mask(iss_mask)
  );

  for (genvar f = 0; f < NUM_ALU; f++) begin : g_alu
    alu_unit u_alu (
      .clk, .rst_n,
      .iss_valid(grant[f]),
      .iss_op   (iss_instr[f].op),
      .iss_a    (iss_instr[f].s1.val),
      .iss_b    (iss_instr[f].s2.val),
      .iss_tag  (iss_instr[f].dst),
      .res      (result[f]),
      .active   (active[f])
    );
  end

  stress_monitor #(.NFU(NUM_ALU), .CNT_W(CNT_W)) u_mon (
    .clk, .rst_n,
    .clear(stats_clear),
    .active,
    .stress_cnt,
    .recov_cnt
  );

  assign fu_issue      = grant;
  assign fu_recovering = td_busy;

endmodule
