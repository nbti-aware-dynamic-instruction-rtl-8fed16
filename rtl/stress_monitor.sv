// stress_monitor: per-ALU stress and recovery cycle counters.
//
// NBTI ageing of an ALU depends on how long it is under stress (executing)
// and how long it recovers (idle with the recovery vector applied). The
// scheduling study tracks these two times for every ALU and feeds them to a
// threshold-voltage model; this block keeps the same statistics in
// hardware, where an on-chip reliability manager could read them. Each cycle
// the counter of every ALU is incremented: stress_cnt if 'active', else
// recov_cnt. 'clear' zeroes all counters. CNT_W = 48 holds more than a day
// of cycles at 3 GHz; the width and the clear input are this design's
// choices.
module stress_monitor #(
  parameter int unsigned NFU   = 4,
  parameter int unsigned CNT_W = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [NFU-1:0]   active,
  output logic [CNT_W-1:0] stress_cnt [NFU],
  output logic [CNT_W-1:0] recov_cnt  [NFU]
);
  for (genvar i = 0; i < NFU; i++) begin : g_fu
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        stress_cnt[i] <= '0;
        recov_cnt[i]  <= '0;
      end else if (clear) begin
        stress_cnt[i] <= '0;
        recov_cnt[i]  <= '0;
      end else if (active[i]) begin
        stress_cnt[i] <= stress_cnt[i] + 1'b1;
      end else begin
        recov_cnt[i]  <= recov_cnt[i] + 1'b1;
      end
    end
  end

endmodule
