// rdt_pkg: shared types for the redundant-data-type (RDT) hardware library.
//
// A redundant data type keeps several copies ("nested instances") of an
// ordinary value. In this library a TMR value of width W is carried as a
// packed array logic [2:0][W-1:0], index 0..2 being copies x, y and z; a
// duplex value is logic [1:0][W-1:0]. The package holds the operator codes of
// the triplicated unary and binary operators, the kind of source the second
// operand of a binary operator comes from, and the move commands and
// fault-injection sites of the hardened maze-robot controller.
package rdt_pkg;

  // Redundancy of the subsystem the second operand of a binary operator comes
  // from: another TMR value (intra-type), a duplex value (inter-type) or an
  // unhardened value of the original type.
  typedef enum logic [1:0] {
    SRC_TMR    = 2'd0,
    SRC_DUPLEX = 2'd1,
    SRC_PLAIN  = 2'd2
  } src_e;

  // Binary operators of the original data type (unsigned arithmetic).
  // Comparisons give 0 or 1 in the result width, as a C++ bool converted back.
  typedef enum logic [3:0] {
    OP_ADD = 4'd0,
    OP_SUB = 4'd1,
    OP_MUL = 4'd2,
    OP_AND = 4'd3,
    OP_OR  = 4'd4,
    OP_XOR = 4'd5,
    OP_SHL = 4'd6,
    OP_SHR = 4'd7,
    OP_EQ  = 4'd8,
    OP_NE  = 4'd9,
    OP_LT  = 4'd10
  } binop_e;

  // Unary operators of the original data type.
  typedef enum logic [2:0] {
    UOP_NEG  = 3'd0,   // -a
    UOP_NOT  = 3'd1,   // ~a
    UOP_LNOT = 3'd2,   // !a
    UOP_INC  = 3'd3,   // a + 1
    UOP_DEC  = 3'd4    // a - 1
  } unop_e;

  // Move command of the robot controller. The code is the turn in quarter
  // turns clockwise that precedes the step, so heading + code is the new
  // heading modulo 4.
  typedef enum logic [1:0] {
    MV_FORWARD = 2'd0,
    MV_RIGHT   = 2'd1,
    MV_BACK    = 2'd2,
    MV_LEFT    = 2'd3
  } move_e;

  // Fault-injection sites of the robot controller: every storage element and
  // every triplicated operator of its data path (the first N_DATA_FSITES
  // codes), then the two single-copy flags of its control path.
  typedef enum logic [3:0] {
    FS_SENS_REG  = 4'd0,
    FS_AND_LEFT  = 4'd1,
    FS_AND_FRONT = 4'd2,
    FS_AND_RIGHT = 4'd3,
    FS_COND_R    = 4'd4,
    FS_COND_F    = 4'd5,
    FS_COND_L    = 4'd6,
    FS_CMD_REG   = 4'd7,
    FS_HEAD_ADD  = 4'd8,
    FS_HEAD_REG  = 4'd9,
    FS_STEP_INC  = 4'd10,
    FS_STEP_REG  = 4'd11,
    FS_CTRL_DEC  = 4'd12,
    FS_CTRL_OUT  = 4'd13
  } fsite_e;

  localparam int unsigned N_DATA_FSITES = 12;
  localparam int unsigned N_FSITES      = 14;

endpackage
