// robot_ctrl: maze-robot controller with a triplicated data path.
//
// The controller steers a robot through a maze by the left-hand rule: at
// every decision point it keeps the wall on its left, so it turns left when
// the left side is open, otherwise goes straight when the front is open,
// otherwise turns right when the right is open, and otherwise turns back.
// It is the hardened ("triple") form of such a controller: every variable is
// a TMR register (tmr_reg) and every operation a triplicated operator with
// voting (tmr_binop, tmr_unop, tmr_cond). The unhardened sensor word enters
// the TMR domain by being written into all three copies, and the outputs
// leave it through voters, the interface to the unhardened rest of the
// system. The small control path (two valid flags) is not triplicated, as the
// method hardens the data path only.
//
// The left-hand rule and the hardening of all data-path variables follow the
// method; the variables themselves (sensor word, move command, heading, move
// count), their widths, the sensor and command interface and the timing are
// this design's choices.
//
// Data path per decision:
//   sens  <- sens_walls                        (TMR register, plain write)
//   wl, wf, wr = sens & 100b, & 010b, & 001b   (binary op, plain operand)
//   turn  = wl ? (wf ? (wr ? BACK : RIGHT) : FORWARD) : LEFT   (ternaries)
//   cmd   <- turn
//   head  <- head + turn  (mod 4)              (binary op, TMR operand)
//   steps <- steps + 1                         (unary op)
//
// Interface and timing: a pulse on sens_valid samples sens_walls
// ({left, front, right}, 1 = wall) at that clock edge. On the next edge the
// decision is stored, and from then on cmd_valid is high for one cycle with
// cmd, heading (after the move's turn) and steps (moves so far) valid. A new
// sample may be given every cycle.
//
// Fault injection: while fi_en is high, bit fi_bit of copy fi_copy at site
// fi_site (one of the registers or operators, see rdt_pkg::fsite_e) is
// inverted: in a register the copy is flipped as it is clocked, in an
// operator the copy's result is inverted. The sites FS_CTRL_DEC and
// FS_CTRL_OUT instead invert the input of the single-copy valid flag
// dec_valid or cmd_valid (fi_copy and fi_bit are then ignored); such faults
// are not masked, which is the cost of hardening the data path only. tmr_err is high in any cycle in
// which some voter sees disagreeing copies.
module robot_ctrl
  import rdt_pkg::*;
#(
  parameter int unsigned STEP_W = 16   // width of the move counter
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sens_valid,
  input  logic [2:0]        sens_walls,  // {left, front, right}, 1 = wall
  output logic              cmd_valid,
  output move_e             cmd,
  output logic [1:0]        heading,     // 0..3, quarter turns from start
  output logic [STEP_W-1:0] steps,
  input  logic              fi_en,
  input  fsite_e            fi_site,
  input  logic [1:0]        fi_copy,
  input  logic [3:0]        fi_bit,
  output logic              tmr_err
);

  localparam int unsigned FW = (STEP_W > 3) ? STEP_W : 3;  // widest site

  // ---- fault-injection masks ---------------------------------------------
  logic [2:0][FW-1:0] fmask [N_DATA_FSITES];

  always_comb begin
    for (int s = 0; s < int'(N_DATA_FSITES); s++) begin
      fmask[s] = '0;
      if (fi_en && fi_site == fsite_e'(s) && fi_copy < 2'd3) begin
        fmask[s][fi_copy] = FW'(1) << fi_bit;
      end
    end
  end

  // ---- control path (not hardened) -----------------------------------------
  logic dec_valid;

  logic fi_dec, fi_out;   // upsets of the two control flags

  assign fi_dec = fi_en && fi_site == FS_CTRL_DEC;
  assign fi_out = fi_en && fi_site == FS_CTRL_OUT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      cmd_valid <= 1'b0;
    end else begin
      dec_valid <= sens_valid ^ fi_dec;
      cmd_valid <= dec_valid ^ fi_out;
    end
  end

  // ---- data path (TMR) ------------------------------------------------------
  logic [2:0][2:0]        sens_q, wl, wf, wr;
  logic [2:0][1:0]        t_r, t_f, turn, cmd_q, head_q, head_sum;
  logic [2:0][STEP_W-1:0] steps_q, steps_inc;
  logic [N_DATA_FSITES-1:0] mis;
  logic [3:0]             dmis_unused;
  logic [2:0]             sel_unused;

  // The upset/fault masks are FW wide per copy; each site takes its low bits.
  function automatic logic [2:0][2:0] m3(input logic [2:0][FW-1:0] m);
    for (int i = 0; i < 3; i++) m3[i] = m[i][2:0];
  endfunction
  function automatic logic [2:0][1:0] m2(input logic [2:0][FW-1:0] m);
    for (int i = 0; i < 3; i++) m2[i] = m[i][1:0];
  endfunction
  function automatic logic [2:0][STEP_W-1:0] ms(input logic [2:0][FW-1:0] m);
    for (int i = 0; i < 3; i++) ms[i] = m[i][STEP_W-1:0];
  endfunction

  tmr_reg #(.W(3)) u_sens (
    .clk, .rst_n, .we(sens_valid), .d({3{sens_walls}}),
    .upset(m3(fmask[FS_SENS_REG])), .q(sens_q), .mismatch(mis[FS_SENS_REG])
  );

  tmr_binop #(.W(3), .B_SRC(SRC_PLAIN)) u_and_l (
    .op(OP_AND), .a(sens_q), .b_tmr('0), .b_dup('0), .b_plain(3'b100),
    .fault(m3(fmask[FS_AND_LEFT])), .y(wl), .mismatch(mis[FS_AND_LEFT]),
    .dup_mismatch(dmis_unused[0])
  );
  tmr_binop #(.W(3), .B_SRC(SRC_PLAIN)) u_and_f (
    .op(OP_AND), .a(sens_q), .b_tmr('0), .b_dup('0), .b_plain(3'b010),
    .fault(m3(fmask[FS_AND_FRONT])), .y(wf), .mismatch(mis[FS_AND_FRONT]),
    .dup_mismatch(dmis_unused[1])
  );
  tmr_binop #(.W(3), .B_SRC(SRC_PLAIN)) u_and_r (
    .op(OP_AND), .a(sens_q), .b_tmr('0), .b_dup('0), .b_plain(3'b001),
    .fault(m3(fmask[FS_AND_RIGHT])), .y(wr), .mismatch(mis[FS_AND_RIGHT]),
    .dup_mismatch(dmis_unused[2])
  );

  tmr_cond #(.W(2), .CW(3)) u_cond_r (
    .cond(wr), .a({3{MV_BACK}}), .b({3{MV_RIGHT}}),
    .fault(m2(fmask[FS_COND_R])), .sel(sel_unused[0]), .y(t_r),
    .mismatch(mis[FS_COND_R])
  );
  tmr_cond #(.W(2), .CW(3)) u_cond_f (
    .cond(wf), .a(t_r), .b({3{MV_FORWARD}}),
    .fault(m2(fmask[FS_COND_F])), .sel(sel_unused[1]), .y(t_f),
    .mismatch(mis[FS_COND_F])
  );
  tmr_cond #(.W(2), .CW(3)) u_cond_l (
    .cond(wl), .a(t_f), .b({3{MV_LEFT}}),
    .fault(m2(fmask[FS_COND_L])), .sel(sel_unused[2]), .y(turn),
    .mismatch(mis[FS_COND_L])
  );

  tmr_reg #(.W(2)) u_cmd (
    .clk, .rst_n, .we(dec_valid), .d(turn),
    .upset(m2(fmask[FS_CMD_REG])), .q(cmd_q), .mismatch(mis[FS_CMD_REG])
  );

  tmr_binop #(.W(2), .B_SRC(SRC_TMR)) u_head_add (
    .op(OP_ADD), .a(head_q), .b_tmr(turn), .b_dup('0), .b_plain('0),
    .fault(m2(fmask[FS_HEAD_ADD])), .y(head_sum), .mismatch(mis[FS_HEAD_ADD]),
    .dup_mismatch(dmis_unused[3])
  );

  tmr_reg #(.W(2)) u_head (
    .clk, .rst_n, .we(dec_valid), .d(head_sum),
    .upset(m2(fmask[FS_HEAD_REG])), .q(head_q), .mismatch(mis[FS_HEAD_REG])
  );

  tmr_unop #(.W(STEP_W)) u_step_inc (
    .op(UOP_INC), .a(steps_q), .fault(ms(fmask[FS_STEP_INC])), .y(steps_inc),
    .mismatch(mis[FS_STEP_INC])
  );

  tmr_reg #(.W(STEP_W)) u_steps (
    .clk, .rst_n, .we(dec_valid), .d(steps_inc),
    .upset(ms(fmask[FS_STEP_REG])), .q(steps_q), .mismatch(mis[FS_STEP_REG])
  );

  // ---- outputs: leave the TMR domain through voters -------------------------
  logic [1:0] cmd_v;
  logic       omis_cmd, omis_head, omis_steps;

  tmr_voter #(.W(2)) u_out_cmd (
    .a(cmd_q[0]), .b(cmd_q[1]), .c(cmd_q[2]), .y(cmd_v), .mismatch(omis_cmd)
  );
  tmr_voter #(.W(2)) u_out_head (
    .a(head_q[0]), .b(head_q[1]), .c(head_q[2]), .y(heading),
    .mismatch(omis_head)
  );
  tmr_voter #(.W(STEP_W)) u_out_steps (
    .a(steps_q[0]), .b(steps_q[1]), .c(steps_q[2]), .y(steps),
    .mismatch(omis_steps)
  );

  assign cmd     = move_e'(cmd_v);

  // Handshake rule: each sample is answered exactly two clocks later (not
  // checked while a fault is being injected).
  a_latency: assert property (@(posedge clk) disable iff (!rst_n || fi_en)
    sens_valid |-> ##2 cmd_valid);
  assign tmr_err = (|mis) | omis_cmd | omis_head | omis_steps;

endmodule
