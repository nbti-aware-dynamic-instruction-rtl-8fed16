// nbti_tb_pkg: reference functions for the testbenches of the NBTI-aware
// issue slice. They restate the ALU operations with plain SystemVerilog
// operators so that expected values do not come from the design itself.
package nbti_tb_pkg;
  import nbti_pkg::*;

  function automatic data_t alu_ref(alu_op_e op, data_t a, data_t b);
    case (op)
      ALU_ADD:    return a + b;
      ALU_SUB:    return a - b;
      ALU_AND:    return a & b;
      ALU_OR:     return a | b;
      ALU_XOR:    return a ^ b;
      ALU_CMPEQ:  return data_t'(a == b);
      ALU_CMPLT:  return data_t'($signed(a) < $signed(b));
      ALU_CMPULT: return data_t'(a < b);
      default:    return '0;
    endcase
  endfunction

endpackage
