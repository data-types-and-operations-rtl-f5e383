// tb_rdt_top: end-to-end test of the top at its default parameters.
//
// Robot part: a perfect 8 x 8 maze is generated here (randomised depth-first
// search driven by a fixed-seed xorshift generator). The robot starts in
// cell (0,0) facing north, with the goal in cell (7,7). The testbench plays
// the robot's body: it reports the walls on the left, front and right of the
// current cell, waits for the command, turns, checks that the cell ahead is
// open (else a collision is counted) and steps. 1000 runs are made, each
// after a reset: run 0 without faults, every other run with one bit of one
// copy at one fault site held inverted for the whole run. Every run must
// reach the goal without a collision, the heading and move count must match
// the testbench's own, and the fault-free path length must be reproduced by
// every faulty run.
//
// Operator part: the three binary operators (TMR, duplex and unhardened
// second operand) are driven with random operands and operator codes, with
// and without a fault in one operator copy and with disagreeing duplex
// copies, and compared with a reference computed here.
//
// Every mechanism (the four moves, faults at each of the twelve sites,
// detected disagreement, each operand case, duplex disagreement) is counted
// and must have happened.
module tb_rdt_top;
  import rdt_pkg::*;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STEP_W = 16;
  localparam int N  = 8;          // maze size
  localparam int RUNS = 1000;

  logic                   clk = 0, rst_n = 1;
  logic                   rb_sens_valid = 0;
  logic [2:0]             rb_sens_walls = '0;
  logic                   rb_cmd_valid;
  move_e                  rb_cmd;
  logic [1:0]             rb_heading;
  logic [STEP_W-1:0]      rb_steps;
  logic                   rb_fi_en = 0;
  fsite_e                 rb_fi_site = FS_SENS_REG;
  logic [1:0]             rb_fi_copy = '0;
  logic [3:0]             rb_fi_bit = '0;
  logic                   rb_tmr_err;
  binop_e                 op = OP_ADD;
  logic [2:0][DATA_W-1:0] a_tmr = '0, b_tmr = '0;
  logic [1:0][DATA_W-1:0] b_dup = '0;
  logic [DATA_W-1:0]      b_plain = '0;
  logic [2:0][DATA_W-1:0] fault_intra = '0, fault_inter = '0, fault_orig = '0;
  logic [2:0][DATA_W-1:0] y_intra, y_inter, y_orig;
  logic                   mis_intra, mis_inter, mis_orig, dup_mismatch;

  rdt_top dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;
  int move_cnt[4];
  int site_runs[N_DATA_FSITES];
  int err_runs = 0, goal_runs = 0, collisions = 0;
  int n_intra = 0, n_inter = 0, n_orig = 0, n_dupmis = 0, n_opfault = 0;
  bit err_in_run;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (rb_tmr_err) err_in_run = 1;
  end

  initial begin
    wait (cycles == 3000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- maze: wall[x][y][d], d = 0 N (y+1), 1 E (x+1), 2 S, 3 W -------------
  bit wall[N][N][4];
  bit seen[N][N];

  function automatic int dx(input int d); return (d == 1) ? 1 : (d == 3) ? -1 : 0; endfunction
  function automatic int dy(input int d); return (d == 0) ? 1 : (d == 2) ? -1 : 0; endfunction

  // xorshift32 generator with a fixed seed, so that the maze (and thus the
  // path length) is the same under every simulator seed
  logic [31:0] maze_rng = 32'h2545_F491;
  function automatic int unsigned maze_rand();
    maze_rng ^= maze_rng << 13;
    maze_rng ^= maze_rng >> 17;
    maze_rng ^= maze_rng << 5;
    return maze_rng;
  endfunction

  task automatic make_maze();
    int sx[$], sy[$];
    for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) begin
      seen[x][y] = 0;
      for (int d = 0; d < 4; d++) wall[x][y][d] = 1;
    end
    sx.push_back(0); sy.push_back(0); seen[0][0] = 1;
    while (sx.size() > 0) begin
      int x, y, opts[$], d, nx, ny;
      x = sx[$]; y = sy[$];
      for (int k = 0; k < 4; k++) begin
        nx = x + dx(k); ny = y + dy(k);
        if (nx >= 0 && nx < N && ny >= 0 && ny < N && !seen[nx][ny]) opts.push_back(k);
      end
      if (opts.size() == 0) begin
        void'(sx.pop_back()); void'(sy.pop_back());
      end else begin
        d = opts[maze_rand() % opts.size()];
        nx = x + dx(d); ny = y + dy(d);
        wall[x][y][d] = 0; wall[nx][ny][(d + 2) % 4] = 0;
        seen[nx][ny] = 1;
        sx.push_back(nx); sy.push_back(ny);
      end
    end
  endtask

  // ---- one run from start to goal -------------------------------------------
  task automatic run_maze(input bit inject, output int moves, output bit reached);
    int x = 0, y = 0;
    int h = 0;
    int d;
    moves = 0; reached = 0;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    rb_fi_en = inject;
    err_in_run = 0;
    while (!reached && moves < 4 * N * N) begin
      rb_sens_walls = {wall[x][y][(h + 3) % 4], wall[x][y][h], wall[x][y][(h + 1) % 4]};
      rb_sens_valid = 1;
      @(negedge clk); rb_sens_valid = 0;
      while (!rb_cmd_valid) @(negedge clk);
      move_cnt[rb_cmd]++;
      h = (h + int'(rb_cmd)) % 4;
      moves++;
      checks++;
      if (int'(rb_heading) != h || int'(rb_steps) != moves) begin
        failures++;
        $display("FAIL heading %0d exp %0d, steps %0d exp %0d", rb_heading, h, rb_steps, moves);
      end
      if (wall[x][y][h]) begin
        collisions++;
        break;
      end
      x += dx(h); y += dy(h);
      if (x == N - 1 && y == N - 1) reached = 1;
    end
    rb_fi_en = 0;
  endtask

  // ---- operator part -------------------------------------------------------
  function automatic logic [DATA_W-1:0] ref_op(input binop_e o, input logic [DATA_W-1:0] p, z);
    case (o)
      OP_ADD: return p + z;
      OP_SUB: return p - z;
      OP_MUL: return DATA_W'(64'(p) * 64'(z));
      OP_AND: return p & z;
      OP_OR:  return p | z;
      OP_XOR: return p ^ z;
      OP_SHL: return p << (z % DATA_W);
      OP_SHR: return p >> (z % DATA_W);
      OP_EQ:  return DATA_W'(p == z);
      OP_NE:  return DATA_W'(p != z);
      OP_LT:  return DATA_W'(p < z);
      default: return '0;
    endcase
  endfunction

  task automatic ops(input int n);
    logic [DATA_W-1:0] va, vb, r, e;
    int k;
    for (int i = 0; i < n; i++) begin
      op = binop_e'($urandom % 11);
      va = $urandom; vb = $urandom;
      if (i % 5 == 0) vb = va;
      a_tmr = {3{va}}; b_tmr = {3{vb}}; b_dup = {2{vb}}; b_plain = vb;
      fault_intra = '0; fault_inter = '0; fault_orig = '0;
      k = i % 3; e = $urandom | 1;
      if (i % 2 == 1) begin
        fault_intra[k] = e; fault_inter[k] = e; fault_orig[k] = e; n_opfault++;
      end
      if (i % 4 == 3) begin
        b_dup[1] = vb ^ e;
      end
      #1;
      r = ref_op(op, va, vb);
      checks += 3;
      if (y_intra !== {3{r}} || mis_intra !== (i % 2 == 1)) begin
        failures++; $display("FAIL intra op=%0d", op);
      end else n_intra++;
      if (y_inter !== {3{r}} || mis_inter !== (i % 2 == 1) || dup_mismatch !== (i % 4 == 3)) begin
        failures++; $display("FAIL inter op=%0d", op);
      end else begin
        n_inter++;
        if (dup_mismatch) n_dupmis++;
      end
      if (y_orig !== {3{r}} || mis_orig !== (i % 2 == 1)) begin
        failures++; $display("FAIL orig op=%0d", op);
      end else n_orig++;
    end
    fault_intra = '0; fault_inter = '0; fault_orig = '0;
  endtask

  initial begin
    int ref_moves, moves;
    bit reached;
    int w;
    // the worked example of triple<int>: b = 7; c = 8; a = b + c gives 15 in
    // every copy
    op = OP_ADD; a_tmr = {3{32'd7}}; b_tmr = {3{32'd8}};
    #1;
    checks++;
    if (y_intra !== {3{32'd15}} || mis_intra) begin
      failures++; $display("FAIL 7 + 8 gave %0d/%0d/%0d", y_intra[0], y_intra[1], y_intra[2]);
    end
    ops(2000);
    make_maze();
    for (int r = 0; r < RUNS; r++) begin
      if (r > 0) begin
        rb_fi_site = fsite_e'($urandom % N_DATA_FSITES);
        rb_fi_copy = 2'($urandom % 3);
        case (rb_fi_site)
          FS_SENS_REG, FS_AND_LEFT, FS_AND_FRONT, FS_AND_RIGHT: w = 3;
          FS_STEP_INC, FS_STEP_REG: w = STEP_W;
          default: w = 2;
        endcase
        rb_fi_bit = 4'($urandom % w);
      end
      run_maze(r > 0, moves, reached);
      checks++;
      if (!reached) begin
        failures++; $display("FAIL run %0d: goal not reached", r);
      end else goal_runs++;
      if (r == 0) ref_moves = moves;
      else begin
        checks++;
        if (moves != ref_moves) begin
          failures++; $display("FAIL run %0d: %0d moves, fault-free %0d", r, moves, ref_moves);
        end
        if (err_in_run) begin
          err_runs++;
          site_runs[rb_fi_site]++;
        end
      end
    end
    $display("fault-free path: %0d moves; goal reached in %0d of %0d runs; collisions %0d",
             ref_moves, goal_runs, RUNS, collisions);
    $display("moves L/F/R/B = %0d/%0d/%0d/%0d; runs with detected disagreement %0d",
             move_cnt[MV_LEFT], move_cnt[MV_FORWARD], move_cnt[MV_RIGHT], move_cnt[MV_BACK], err_runs);
    $display("operators: intra %0d, inter %0d (duplex disagreement %0d), orig %0d, with operator fault %0d",
             n_intra, n_inter, n_dupmis, n_orig, n_opfault);
    checks++;
    if (collisions != 0) failures++;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (move_cnt[i] == 0) begin failures++; $display("FAIL move %0d never taken", i); end
    end
    for (int i = 0; i < int'(N_DATA_FSITES); i++) begin
      checks++;
      if (site_runs[i] == 0) begin failures++; $display("FAIL no masked fault at site %0d", i); end
    end
    checks += 5;
    if (err_runs == 0) failures++;
    if (n_intra == 0 || n_inter == 0 || n_orig == 0) failures++;
    if (n_dupmis == 0) failures++;
    if (n_opfault == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
