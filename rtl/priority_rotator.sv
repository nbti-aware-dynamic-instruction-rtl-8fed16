// priority_rotator: priority offset for the PR (priority rotation) policy.
//
// The select logic gives the highest priority to ALU 'offset', the next to
// offset+1 and so on, wrapping around. Under PR the offset starts at 0
// (FU0 highest, FU(n-1) lowest) and, each time CYCLE_PR cycles have elapsed,
// moves on by one in round-robin order: after the first period FU1 is
// highest and FU0 lowest. Under PS and TD the offset is held at 0 and the
// period counter cleared, so switching into PR starts a fresh period.
// 'rotate' pulses in the cycle whose clock edge advances the offset.
// CYCLE_PR = 10000 is the value used in the scheduling study; clearing the
// period on a policy change is this design's choice.
module priority_rotator
  import nbti_pkg::*;
#(
  parameter int unsigned NFU      = 4,
  parameter int unsigned CYCLE_PR = 10000,
  localparam int unsigned OFF_W   = (NFU > 1) ? $clog2(NFU) : 1,
  localparam int unsigned CNT_W   = (CYCLE_PR > 1) ? $clog2(CYCLE_PR) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  policy_e          policy,
  output logic [OFF_W-1:0] offset,
  output logic             rotate
);
  logic [CNT_W-1:0] cnt;

  assign rotate = (policy == POL_PR) && (cnt == CNT_W'(CYCLE_PR - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      offset <= '0;
    end else if (policy != POL_PR) begin
      cnt    <= '0;
      offset <= '0;
    end else if (rotate) begin
      cnt    <= '0;
      offset <= (offset == OFF_W'(NFU - 1)) ? '0 : offset + 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
    end
  end

endmodule
