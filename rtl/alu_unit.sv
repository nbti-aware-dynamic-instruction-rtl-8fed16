// alu_unit: one integer ALU slot of the issue slice.
//
// In the issue cycle the select logic hands an instruction (operation,
// operands, destination tag) to the slot; it is registered at the clock
// edge and the ALU computes it in the following cycle. The result and its
// tag leave the slot combinationally in that cycle as a result_t, which is
// broadcast to the issue window for wakeup. The ALU is fully pipelined with
// a latency of one cycle, so a new instruction can be issued every cycle.
// When no instruction is issued, recovery_vectoring loads the recovery
// vector into the operand register, so an idle ALU always sits in NBTI
// recovery, as the scheduling study assumes. 'active' is high in the cycle
// the ALU executes (stress), low when it recovers.
// The one-cycle latency is this design's choice; the study gives no ALU
// latency.
module alu_unit
  import nbti_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    iss_valid,
  input  alu_op_e iss_op,
  input  data_t   iss_a,
  input  data_t   iss_b,
  input  tag_t    iss_tag,
  output result_t res,
  output logic    active
);
  alu_op_e op_v, op_q;
  data_t   a_v, b_v, a_q, b_q;
  logic    valid_q;
  tag_t    tag_q;
  logic    rec_unused;
  data_t   y;

  recovery_vectoring u_vec (
    .valid     (iss_valid),
    .op_in     (iss_op),
    .a_in      (iss_a),
    .b_in      (iss_b),
    .op_out    (op_v),
    .a_out     (a_v),
    .b_out     (b_v),
    .recovering(rec_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      op_q    <= ALU_ADD;
      a_q     <= '1;
      b_q     <= '1;
      tag_q   <= '0;
    end else begin
      valid_q <= iss_valid;
      op_q    <= op_v;
      a_q     <= a_v;
      b_q     <= b_v;
      if (iss_valid) tag_q <= iss_tag;
    end
  end

  int_alu u_alu (.op(op_q), .a(a_q), .b(b_q), .y(y));

  assign res    = '{valid: valid_q, tag: tag_q, val: y};
  assign active = valid_q;

endmodule
