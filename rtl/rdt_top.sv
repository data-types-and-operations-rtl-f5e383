// rdt_top: redundant-data-type hardening, shown on two designs side by side.
//
// 1. robot_ctrl: a maze-robot controller following the left-hand rule, with
//    every data-path variable and operation triplicated and voted. Its sensor
//    and command ports, its step counter and its fault-injection port are
//    brought out unchanged (prefix rb_).
// 2. Three triplicated binary operators (tmr_binop) on DATA_W-bit values, one
//    for each way the second operand of an operation on a TMR value can be
//    hardened: (a) another TMR value, (b) a duplex value, entering through a
//    compare/switch stage, (c) an unhardened value of the original type. All
//    three share the TMR first operand and the operator code. They are
//    combinational; results appear in the same cycle.
//
// The pairing of the two on one top is for building and testing them
// together: apart from clock and reset they share no signals. DATA_W defaults to
// 32, the width of the C++ int of the method's examples; STEP_W (width of the
// robot's move counter) is this design's choice.
module rdt_top
  import rdt_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned STEP_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // robot controller
  input  logic                  rb_sens_valid,
  input  logic [2:0]            rb_sens_walls,
  output logic                  rb_cmd_valid,
  output move_e                 rb_cmd,
  output logic [1:0]            rb_heading,
  output logic [STEP_W-1:0]     rb_steps,
  input  logic                  rb_fi_en,
  input  fsite_e                rb_fi_site,
  input  logic [1:0]            rb_fi_copy,
  input  logic [3:0]            rb_fi_bit,
  output logic                  rb_tmr_err,
  // binary operator, three operand cases
  input  binop_e                op,
  input  logic [2:0][DATA_W-1:0] a_tmr,
  input  logic [2:0][DATA_W-1:0] b_tmr,
  input  logic [1:0][DATA_W-1:0] b_dup,
  input  logic [DATA_W-1:0]      b_plain,
  input  logic [2:0][DATA_W-1:0] fault_intra,
  input  logic [2:0][DATA_W-1:0] fault_inter,
  input  logic [2:0][DATA_W-1:0] fault_orig,
  output logic [2:0][DATA_W-1:0] y_intra,
  output logic [2:0][DATA_W-1:0] y_inter,
  output logic [2:0][DATA_W-1:0] y_orig,
  output logic                  mis_intra,
  output logic                  mis_inter,
  output logic                  mis_orig,
  output logic                  dup_mismatch
);

  robot_ctrl #(.STEP_W(STEP_W)) u_robot (
    .clk, .rst_n,
    .sens_valid(rb_sens_valid), .sens_walls(rb_sens_walls),
    .cmd_valid(rb_cmd_valid), .cmd(rb_cmd), .heading(rb_heading),
    .steps(rb_steps),
    .fi_en(rb_fi_en), .fi_site(rb_fi_site), .fi_copy(rb_fi_copy),
    .fi_bit(rb_fi_bit), .tmr_err(rb_tmr_err)
  );

  logic [1:0] dmis_unused;

  tmr_binop #(.W(DATA_W), .B_SRC(SRC_TMR)) u_intra (
    .op, .a(a_tmr), .b_tmr, .b_dup('0), .b_plain('0), .fault(fault_intra),
    .y(y_intra), .mismatch(mis_intra), .dup_mismatch(dmis_unused[0])
  );

  tmr_binop #(.W(DATA_W), .B_SRC(SRC_DUPLEX)) u_inter (
    .op, .a(a_tmr), .b_tmr('0), .b_dup, .b_plain('0), .fault(fault_inter),
    .y(y_inter), .mismatch(mis_inter), .dup_mismatch(dup_mismatch)
  );

  tmr_binop #(.W(DATA_W), .B_SRC(SRC_PLAIN)) u_orig (
    .op, .a(a_tmr), .b_tmr('0), .b_dup('0), .b_plain, .fault(fault_orig),
    .y(y_orig), .mismatch(mis_orig), .dup_mismatch(dmis_unused[1])
  );

endmodule
