// tb_fault_campaign: single-fault injection campaign on the hardened robot.
//
// Repeats, in simulation, a configuration-upset experiment: 1000 maze runs,
// each starting from reset in the same maze, the same start (0,0, facing
// north) and the same goal (7,7), with one fault held for the whole run. The
// fault is drawn uniformly from every fault bit of the controller: each bit
// of each copy at the twelve data-path sites, and the two single-copy valid
// flags of the control path. The draw and the maze use fixed-seed xorshift
// generators, so the campaign is the same under every simulator seed.
//
// The testbench plays robot and maze. Each run is compared with the
// fault-free run: a run is "electronic failed" when any answer differs in
// command, heading or count, arrives without its sample, or does not arrive
// within a few clocks. It also records whether the goal was reached and
// whether the robot hit a wall. At the end it prints a summary table.
//
// Checks: every run with a data-path fault must be electronically correct
// (the triplication must mask it); at least one run must hit each kind of
// site; runs with a control-path fault are only counted, since that part is
// deliberately left unhardened.
module tb_fault_campaign;
  import rdt_pkg::*;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STEP_W = 16;
  localparam int N    = 8;
  localparam int RUNS = 1000;
  localparam int MAX_MOVES = 4 * N * N;

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

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- fixed-seed generator --------------------------------------------------
  logic [31:0] rng = 32'h2545_F491;
  function automatic int unsigned xrand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  // ---- maze (same construction as the end-to-end test) -------------------------
  bit wall[N][N][4];
  bit seen[N][N];
  function automatic int dx(input int d); return (d == 1) ? 1 : (d == 3) ? -1 : 0; endfunction
  function automatic int dy(input int d); return (d == 0) ? 1 : (d == 2) ? -1 : 0; endfunction

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
        d = opts[xrand() % opts.size()];
        nx = x + dx(d); ny = y + dy(d);
        wall[x][y][d] = 0; wall[nx][ny][(d + 2) % 4] = 0;
        seen[nx][ny] = 1;
        sx.push_back(nx); sy.push_back(ny);
      end
    end
  endtask

  // ---- fault population: every bit of every copy at every site ----------------
  function automatic int site_width(input fsite_e s);
    case (s)
      FS_SENS_REG, FS_AND_LEFT, FS_AND_FRONT, FS_AND_RIGHT: return 3;
      FS_STEP_INC, FS_STEP_REG: return STEP_W;
      FS_CTRL_DEC, FS_CTRL_OUT: return 0;
      default: return 2;
    endcase
  endfunction

  function automatic int site_bits(input fsite_e s);
    return (s == FS_CTRL_DEC || s == FS_CTRL_OUT) ? 1 : 3 * site_width(s);
  endfunction

  int total_bits;

  task automatic draw_fault();
    int k;
    k = int'(xrand() % total_bits);
    for (int s = 0; s < int'(N_FSITES); s++) begin
      if (k < site_bits(fsite_e'(s))) begin
        rb_fi_site = fsite_e'(s);
        if (site_width(fsite_e'(s)) == 0) begin
          rb_fi_copy = '0; rb_fi_bit = '0;
        end else begin
          rb_fi_copy = 2'(k / site_width(fsite_e'(s)));
          rb_fi_bit  = 4'(k % site_width(fsite_e'(s)));
        end
        return;
      end
      k -= site_bits(fsite_e'(s));
    end
  endtask

  // ---- one run -------------------------------------------------------------------
  typedef struct packed { move_e mv; logic [1:0] hd; logic [STEP_W-1:0] st; } ans_t;
  ans_t ref_trace[$];
  int   ref_moves;

  task automatic run(input bit inject, input bit record,
                     output bit el_fail, output bit reached, output bit collided);
    int x = 0, y = 0, h = 0, moves = 0, wait_cyc;
    ans_t a;
    el_fail = 0; reached = 0; collided = 0;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    rb_fi_en = inject;
    while (!reached && !collided && moves < MAX_MOVES) begin
      // a valid strobe that was already high before the sample is an error
      if (rb_cmd_valid) el_fail = 1;
      rb_sens_walls = {wall[x][y][(h + 3) % 4], wall[x][y][h], wall[x][y][(h + 1) % 4]};
      rb_sens_valid = 1;
      @(negedge clk); rb_sens_valid = 0;
      wait_cyc = 0;
      while (!rb_cmd_valid && wait_cyc < 8) begin
        @(negedge clk); wait_cyc++;
      end
      if (!rb_cmd_valid) begin
        el_fail = 1;       // no answer: the robot stands still
        break;
      end
      if (wait_cyc != 1) el_fail = 1;   // answer two clocks after the sample
      a.mv = rb_cmd; a.hd = rb_heading; a.st = rb_steps;
      if (record) ref_trace.push_back(a);
      else if (moves >= ref_trace.size() || a != ref_trace[moves]) el_fail = 1;
      @(negedge clk);
      h = (h + int'(rb_cmd)) % 4;
      moves++;
      if (wall[x][y][h]) collided = 1;
      else begin
        x += dx(h); y += dy(h);
        if (x == N - 1 && y == N - 1) reached = 1;
      end
    end
    if (!record && moves != ref_moves) el_fail = 1;
    if (record) ref_moves = moves;
    rb_fi_en = 0;
  endtask

  // ---- campaign ------------------------------------------------------------------
  int n_ok = 0, n_fail = 0, n_goal_not = 0, n_coll = 0, n_goal_alth = 0;
  int n_data_runs = 0, n_ctrl_runs = 0, n_ctrl_fail = 0;
  int site_hits[N_FSITES];

  initial begin
    bit ef, rc, co;
    total_bits = 0;
    for (int s = 0; s < int'(N_FSITES); s++) total_bits += site_bits(fsite_e'(s));
    make_maze();
    run(0, 1, ef, rc, co);
    checks++;
    if (!rc || co) begin failures++; $display("FAIL fault-free run did not reach the goal"); end
    for (int r = 0; r < RUNS; r++) begin
      draw_fault();
      site_hits[rb_fi_site]++;
      run(1, 0, ef, rc, co);
      if (ef) n_fail++; else n_ok++;
      if (!rc) n_goal_not++;
      if (co) n_coll++;
      if (ef && rc) n_goal_alth++;
      if (int'(rb_fi_site) < int'(N_DATA_FSITES)) begin
        n_data_runs++;
        checks++;
        if (ef || !rc || co) begin
          failures++;
          $display("FAIL run %0d: data-path fault site %0d copy %0d bit %0d not masked",
                   r, rb_fi_site, rb_fi_copy, rb_fi_bit);
        end
      end else begin
        n_ctrl_runs++;
        if (ef) n_ctrl_fail++;
      end
    end
    $display("fault bits: %0d; fault-free path %0d moves", total_bits, ref_moves);
    $display("runs                          %0d", RUNS);
    $display("  electronic OK               %0d", n_ok);
    $display("  electronic failed           %0d", n_fail);
    $display("  goal not reached            %0d", n_goal_not);
    $display("  collision with wall         %0d", n_coll);
    $display("  goal reached although failed %0d", n_goal_alth);
    $display("runs with data-path fault     %0d (all masked if no FAIL above)", n_data_runs);
    $display("runs with control-path fault  %0d, of which electronic failed %0d",
             n_ctrl_runs, n_ctrl_fail);
    for (int s = 0; s < int'(N_FSITES); s++) begin
      checks++;
      if (site_hits[s] == 0) begin failures++; $display("FAIL site %0d never drawn", s); end
    end
    checks++;
    if (n_ctrl_runs == 0 || n_data_runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
