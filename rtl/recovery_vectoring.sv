// recovery_vectoring: input vectoring for an idle integer ALU.
//
// An ALU that is not given an instruction in a cycle has its operand inputs
// forced to a fixed recovery vector instead of holding whatever was last on
// the operand bus. The scheduling study assumes that every idle functional
// unit is put into the NBTI recovery phase this way (a PMOS gate held at '1'
// does not age and partly recovers). Which vector suits a given adder layout
// is a circuit-level question the study leaves to earlier work; this design
// defaults to all ones on both operands with an ADD, set by parameters.
// Purely combinational mux in front of the ALU's operand register.
module recovery_vectoring
  import nbti_pkg::*;
#(
  parameter data_t   REC_A  = '1,
  parameter data_t   REC_B  = '1,
  parameter alu_op_e REC_OP = ALU_ADD
) (
  input  logic    valid,      // an instruction is issued to this ALU
  input  alu_op_e op_in,
  input  data_t   a_in,
  input  data_t   b_in,
  output alu_op_e op_out,
  output data_t   a_out,
  output data_t   b_out,
  output logic    recovering  // the recovery vector is being applied
);
  always_comb begin
    if (valid) begin
      op_out = op_in;
      a_out  = a_in;
      b_out  = b_in;
    end else begin
      op_out = REC_OP;
      a_out  = REC_A;
      b_out  = REC_B;
    end
  end

  assign recovering = ~valid;

endmodule
