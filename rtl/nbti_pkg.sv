// nbti_pkg: types and constants shared by the NBTI-aware issue slice.
//
// The scheduling policy is a run-time mode. PS (prioritized scheduling) is
// the conventional select: ALU0 always has the highest priority. PR
// (priority rotation) moves the highest priority to the next ALU every
// CYCLE_PR cycles. TD (time-dependent) keeps an ALU busy for CYCLE_TD cycles
// after each use so that it recovers. The three policies and their names
// follow the scheduling study this design implements; the encodings, the ALU
// operation set and the instruction record are this design's own choices.
package nbti_pkg;

  typedef enum logic [1:0] {
    POL_PS = 2'd0,  // prioritized, fixed priority FU0 > FU1 > ...
    POL_PR = 2'd1,  // priority rotation every CYCLE_PR cycles
    POL_TD = 2'd2   // fixed priority plus CYCLE_TD recovery cycles after use
  } policy_e;

  // Integer ALU operations. Add, subtract and the compares use the
  // Kogge-Stone adder; the logic operations bypass it.
  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,
    ALU_SUB   = 3'd1,
    ALU_AND   = 3'd2,
    ALU_OR    = 3'd3,
    ALU_XOR   = 3'd4,
    ALU_CMPEQ = 3'd5,  // 1 if a == b
    ALU_CMPLT = 3'd6,  // 1 if a < b, signed
    ALU_CMPULT= 3'd7   // 1 if a < b, unsigned
  } alu_op_e;

  localparam int unsigned DATA_W = 64;  // Alpha integer width
  localparam int unsigned TAG_W  = 7;   // renamed destination tag

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [TAG_W-1:0]  tag_t;

  // One source operand as seen by the issue window: either its value is
  // present (rdy) or it waits for the result carrying 'tag'.
  typedef struct packed {
    logic  rdy;
    tag_t  tag;
    data_t val;
  } src_t;

  // One instruction as dispatched into the issue window.
  typedef struct packed {
    alu_op_e op;
    tag_t    dst;
    src_t    s1;
    src_t    s2;
  } instr_t;

  // A result broadcast on the wakeup bus and returned to the core.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    data_t val;
  } result_t;

endpackage
