// select_logic: oldest-first instruction select with ALU priority.
//
// Each cycle the select logic takes the ready vector of the issue window and
// grants as many ready instructions as there are available ALUs. Ready
// instructions are taken oldest first: the window is a circular buffer in
// program order whose oldest entry is 'head', so the search starts there.
// The i-th oldest selected instruction is given to the i-th highest-priority
// available ALU. ALU priority runs offset, offset+1, ..., wrapping at NFU:
// with offset 0 this is the conventional prioritized select (lowest-numbered
// free ALU first, the PS policy); the PR policy rotates the offset; the TD
// policy removes recovering ALUs through 'fu_busy'. Purely combinational:
// grants are for the current cycle. Outputs: per ALU a grant and the window
// index of its instruction, and the same grants as a mask over the window.
// Oldest-first order and lowest-numbered-first assignment follow the
// study's description of a modern select; the pairing of the i-th oldest
// instruction with the i-th free ALU is this design's reading of it.
module select_logic #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned NFU     = 4,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned OFF_W  = (NFU > 1) ? $clog2(NFU) : 1
) (
  input  logic [ENTRIES-1:0] ready,
  input  logic [IDX_W-1:0]   head,
  input  logic [NFU-1:0]     fu_busy,
  input  logic [OFF_W-1:0]   offset,
  output logic [NFU-1:0]     grant,
  output logic [IDX_W-1:0]   grant_idx [NFU],
  output logic [ENTRIES-1:0] issue_mask
);
  logic [IDX_W-1:0] pick [NFU];   // window index of the k-th oldest pick
  int unsigned      n_avail;
  int unsigned      n_pick;
  int unsigned      k;
  int unsigned      idx;
  int unsigned      fu;

  always_comb begin
    n_avail = 0;
    for (int unsigned f = 0; f < NFU; f++)
      if (!fu_busy[f]) n_avail++;

    // oldest-first: walk the circular window from head
    n_pick = 0;
    for (int unsigned p = 0; p < NFU; p++) pick[p] = '0;
    for (int unsigned j = 0; j < ENTRIES; j++) begin
      idx = int'(head) + j;
      if (idx >= ENTRIES) idx -= ENTRIES;
      if (ready[idx] && n_pick < n_avail && n_pick < NFU) begin
        pick[n_pick] = IDX_W'(idx);
        n_pick++;
      end
    end

    // ALU assignment in priority order starting at 'offset'
    grant      = '0;
    issue_mask = '0;
    for (int unsigned f = 0; f < NFU; f++) grant_idx[f] = '0;
    k = 0;
    for (int unsigned p = 0; p < NFU; p++) begin
      fu = int'(offset) + p;
      if (fu >= NFU) fu -= NFU;
      if (!fu_busy[fu] && k < n_pick) begin
        grant[fu]           = 1'b1;
        grant_idx[fu]       = pick[k];
        issue_mask[pick[k]] = 1'b1;
        k++;
      end
    end
  end

endmodule
