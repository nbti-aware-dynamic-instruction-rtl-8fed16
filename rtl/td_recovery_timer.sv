// td_recovery_timer: forced recovery periods for the TD policy.
//
// Under TD, once an ALU has been given an instruction it is reported busy
// for the next CYCLE_TD cycles, so the select logic assigns it nothing and
// the ALU recovers for CYCLE_TD cycles after each stress cycle. This is the
// hardware the scheduling study suggests: keep the unit's busy signal
// asserted for CYCLE_TD cycles after it is used. One down-counter per ALU is
// loaded with CYCLE_TD in the issue cycle ('used') and busy is its non-zero
// test, so an ALU used in cycle t is busy in t+1 .. t+CYCLE_TD and can be
// used again in t+CYCLE_TD+1. Under PS and PR the counters are cleared and
// nothing is busy. CYCLE_TD = 2 is the study's main setting; it also
// evaluates 1 and 3.
module td_recovery_timer
  import nbti_pkg::*;
#(
  parameter int unsigned NFU      = 4,
  parameter int unsigned CYCLE_TD = 2,
  localparam int unsigned CNT_W   = (CYCLE_TD > 0) ? $clog2(CYCLE_TD + 1) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  policy_e        policy,
  input  logic [NFU-1:0] used,   // ALU i is issued an instruction this cycle
  output logic [NFU-1:0] busy    // ALU i must not be issued to this cycle
);
  logic [CNT_W-1:0] cnt [NFU];

  for (genvar i = 0; i < NFU; i++) begin : g_fu
    always_ff @(posedge clk) begin
      if (!rst_n)
        cnt[i] <= '0;
      else if (policy != POL_TD)
        cnt[i] <= '0;
      else if (used[i])
        cnt[i] <= CNT_W'(CYCLE_TD);
      else if (cnt[i] != '0)
        cnt[i] <= cnt[i] - 1'b1;
    end
    assign busy[i] = (cnt[i] != '0);
  end

  // The select logic must never issue to an ALU that is recovering.
  a_no_use_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (used & busy) == '0);

endmodule
