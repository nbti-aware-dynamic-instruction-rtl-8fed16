// issue_window: age-ordered issue window with tag-broadcast wakeup.
//
// The window holds up to ENTRIES dispatched integer instructions in a
// circular buffer in program order ('head' is the oldest), like the
// register update unit of the simulated core. Each entry keeps its
// operation, destination tag and two source operands; a source is either
// ready with its value or waits for a tag. Every cycle each ALU result on
// 'bcast' is compared with the source tags of all waiting entries and of
// the instructions being dispatched; on a match the value is captured and
// the source marked ready (wakeup). An entry whose two sources are ready
// and that has not issued raises its bit in 'ready' for the select logic.
// 'iss_mask' marks entries issued; 'rd_idx'/'rd_instr' read the issued
// instructions with their operand values. Issued entries are released in
// order from the head, up to DISP_W per cycle.
// Dispatch: up to DISP_W instructions per cycle, packed in lane order,
// accepted only while 'disp_ready' (at least DISP_W free entries); a
// dispatcher that sees it low must hold its instructions (dispatch stall).
// Timing: a result broadcast in cycle t makes its consumers ready in t+1;
// an entry issued in t is released no earlier than t+1.
// Wakeup by tag comparison follows the scheduling study; the data-capture
// entry, in-order release and the dispatch rule are this design's choices.
module issue_window
  import nbti_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned DISP_W  = 4,
  parameter int unsigned NBC     = 4,   // result broadcast buses
  parameter int unsigned NRD     = 4,   // read ports, one per ALU
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // dispatch
  input  logic [DISP_W-1:0]  disp_valid,
  input  instr_t             disp_instr [DISP_W],
  output logic               disp_ready,
  // wakeup
  input  result_t            bcast [NBC],
  // select interface
  output logic [ENTRIES-1:0] ready,
  output logic [IDX_W-1:0]   head,
  input  logic [ENTRIES-1:0] iss_mask,
  input  logic [IDX_W-1:0]   rd_idx [NRD],
  output instr_t             rd_instr [NRD],
  // occupancy
  output logic [IDX_W:0]     count
);
  // tags must be able to cycle through twice the window without aliasing
  if ((2 * ENTRIES) > (1 << TAG_W)) begin : g_tag_check
    $error("issue_window: TAG_W in nbti_pkg is too narrow for ENTRIES");
  end

  instr_t             ent [ENTRIES];
  logic [ENTRIES-1:0] valid;
  logic [ENTRIES-1:0] issued;
  logic [IDX_W-1:0]   tail;

  // capture a broadcast result into a waiting source
  function automatic src_t wake(src_t s, result_t b [NBC]);
    src_t r = s;
    for (int unsigned i = 0; i < NBC; i++)
      if (!r.rdy && b[i].valid && b[i].tag == s.tag) begin
        r.rdy = 1'b1;
        r.val = b[i].val;
      end
    return r;
  endfunction

  function automatic logic [IDX_W-1:0] wrap_add(logic [IDX_W-1:0] a, int unsigned n);
    int unsigned s = int'(a) + n;
    if (s >= ENTRIES) s -= ENTRIES;
    return IDX_W'(s);
  endfunction

  assign disp_ready = (ENTRIES - int'(count)) >= DISP_W;

  for (genvar e = 0; e < ENTRIES; e++) begin : g_rdy
    assign ready[e] = valid[e] && !issued[e] && ent[e].s1.rdy && ent[e].s2.rdy;
  end

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    assign rd_instr[r] = ent[rd_idx[r]];
  end

  // in-order release of issued entries from the head
  int unsigned n_rel;
  int unsigned n_disp;
  always_comb begin
    n_rel = 0;
    for (int unsigned j = 0; j < DISP_W; j++)
      if (n_rel == j && valid[wrap_add(head, j)] && issued[wrap_add(head, j)])
        n_rel++;
    n_disp = 0;
    if (disp_ready)
      for (int unsigned l = 0; l < DISP_W; l++)
        if (disp_valid[l]) n_disp++;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid  <= '0;
      issued <= '0;
      head   <= '0;
      tail   <= '0;
      count  <= '0;
      for (int unsigned e = 0; e < ENTRIES; e++) ent[e] <= '0;
    end else begin
      // wakeup of waiting entries and issue marking
      for (int unsigned e = 0; e < ENTRIES; e++) begin
        if (valid[e]) begin
          ent[e].s1 <= wake(ent[e].s1, bcast);
          ent[e].s2 <= wake(ent[e].s2, bcast);
        end
        if (iss_mask[e]) issued[e] <= 1'b1;
      end
      // release
      for (int unsigned j = 0; j < DISP_W; j++)
        if (j < n_rel) valid[wrap_add(head, j)] <= 1'b0;
      head <= wrap_add(head, n_rel);
      // dispatch, with wakeup by a result broadcast in the same cycle
      if (disp_ready) begin
        automatic int unsigned n = 0;
        for (int unsigned l = 0; l < DISP_W; l++) begin
          if (disp_valid[l]) begin
            ent[wrap_add(tail, n)]    <= '{op: disp_instr[l].op, dst: disp_instr[l].dst,
                                           s1: wake(disp_instr[l].s1, bcast),
                                           s2: wake(disp_instr[l].s2, bcast)};
            valid[wrap_add(tail, n)]  <= 1'b1;
            issued[wrap_add(tail, n)] <= 1'b0;
            n++;
          end
        end
      end
      tail  <= wrap_add(tail, n_disp);
      count <= (IDX_W+1)'(int'(count) + n_disp - n_rel);
    end
  end

  // occupancy never exceeds the window
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (IDX_W+1)'(ENTRIES));

  // only ready entries may be issued
  a_issue_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (iss_mask & ~ready) == '0);

endmodule
