// int_alu: 64-bit integer ALU of the issue slice.
//
// Add, subtract and the three compares all go through one Kogge-Stone adder
// (ks_adder), the circuit the scheduling study uses to model an integer ALU.
// Subtract and compares compute a + ~b + 1; equality is the zero test of the
// XOR, signed less-than comes from the sign of the difference and overflow,
// unsigned less-than from the missing carry. AND, OR and XOR are computed
// directly. Purely combinational: the result is valid in the cycle the
// operands are. The operation set is this design's choice: the study names
// only "integer ALU" instructions of the Alpha ISA.
module int_alu
  import nbti_pkg::*;
(
  input  alu_op_e op,
  input  data_t   a,
  input  data_t   b,
  output data_t   y
);
  logic  sub;       // adder computes a - b
  data_t b_in;
  data_t sum;
  logic  cout;
  logic  ovf;
  logic  lt_s;      // a < b, signed
  logic  lt_u;      // a < b, unsigned
  logic  eq;        // a == b

  assign sub  = (op != ALU_ADD);
  assign b_in = sub ? ~b : b;

  ks_adder #(.W(DATA_W)) u_add (
    .a   (a),
    .b   (b_in),
    .cin (sub),
    .sum (sum),
    .cout(cout)
  );

  // signed overflow of a - b: operands differ in sign, result sign != a's
  assign ovf = (a[DATA_W-1] != b[DATA_W-1]) && (sum[DATA_W-1] != a[DATA_W-1]);

  assign lt_s = sum[DATA_W-1] ^ ovf;
  assign lt_u = ~cout;
  assign eq   = ~|(a ^ b);

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum;
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_XOR:          y = a ^ b;
      ALU_CMPEQ:        y = {{(DATA_W-1){1'b0}}, eq};
      ALU_CMPLT:        y = {{(DATA_W-1){1'b0}}, lt_s};
      ALU_CMPULT:       y = {{(DATA_W-1){1'b0}}, lt_u};
      default:          y = '0;
    endcase
  end

endmodule
