// tb_robot_ctrl: self-checking test of the hardened left-hand-rule controller.
//
// Random sensor words are fed, some back to back and some with gaps. A
// reference model here applies the left-hand rule, keeps the heading and the
// move count, and expects each answer exactly two clocks after its sample.
// The stream is split into windows: fault-free ones, and ones in which one
// bit of one copy at one fault site is held inverted. In every window the
// outputs must match the reference; in fault windows tmr_err must be seen.
// Each of the four moves and each of the twelve fault sites is counted and
// must occur. Last, each of the two single-copy control flags is inverted
// for four cycles without samples, which must yield four unrequested answers
// (control-path faults are not masked).
module tb_robot_ctrl;
  import rdt_pkg::*;
  localparam int unsigned STEP_W = 16;
  localparam int LAT = 2;

  logic              clk = 0, rst_n = 1;
  logic              sens_valid = 0;
  logic [2:0]        sens_walls = '0;
  logic              cmd_valid;
  move_e             cmd;
  logic [1:0]        heading;
  logic [STEP_W-1:0] steps;
  logic              fi_en = 0;
  fsite_e            fi_site = FS_SENS_REG;
  logic [1:0]        fi_copy = '0;
  logic [3:0]        fi_bit = '0;
  logic              tmr_err;

  robot_ctrl #(.STEP_W(STEP_W)) dut (.*);

  int checks = 0, failures = 0, cycles = 0;
  int move_cnt[4];
  int site_cnt[N_DATA_FSITES];
  int err_seen;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected answers, queued by sample time
  typedef struct packed {
    int unsigned due;
    move_e       mv;
    logic [1:0]  hd;
    logic [STEP_W-1:0] st;
  } exp_t;
  exp_t q[$];
  logic [1:0]        ref_head = '0;
  logic [STEP_W-1:0] ref_steps = '0;

  function automatic move_e left_hand(input logic [2:0] w);
    if (!w[2]) return MV_LEFT;
    if (!w[1]) return MV_FORWARD;
    if (!w[0]) return MV_RIGHT;
    return MV_BACK;
  endfunction

  // monitor: compare and check timing
  bit ctrl_test = 0;   // control-flag faults: answers are not compared
  int spurious = 0;

  always @(posedge clk) if (rst_n) begin
    if (tmr_err) err_seen++;
    if (ctrl_test) begin
      if (cmd_valid) spurious++;
    end else if (cmd_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected cmd_valid at %0d", cycles);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (e.due != cycles || cmd != e.mv || heading != e.hd || steps != e.st) begin
          failures++;
          $display("FAIL cycle %0d (due %0d): cmd=%0d exp %0d head=%0d exp %0d steps=%0d exp %0d site=%0d en=%b",
                   cycles, e.due, cmd, e.mv, heading, e.hd, steps, e.st, fi_site, fi_en);
        end
        move_cnt[e.mv]++;
      end
    end
  end

  task automatic sample(input logic [2:0] w);
    exp_t e;
    move_e m;
    @(negedge clk);
    sens_valid = 1; sens_walls = w;
    m = left_hand(w);
    ref_head  = ref_head + 2'(m);
    ref_steps = ref_steps + 1'b1;
    e.due = cycles + 1 + LAT;   // sampled at the next edge, answer LAT edges later
    e.mv = m; e.hd = ref_head; e.st = ref_steps;
    q.push_back(e);
    @(negedge clk);
    sens_valid = 0;
  endtask

  task automatic burst(input int n);
    for (int i = 0; i < n; i++) begin
      exp_t e;
      move_e m;
      logic [2:0] w;
      w = 3'($urandom);
      if (i % 3 == 2) begin
        // back-to-back sample, no idle cycle in between
        @(negedge clk);
        sens_valid = 1; sens_walls = w;
        m = left_hand(w);
        ref_head  = ref_head + 2'(m);
        ref_steps = ref_steps + 1'b1;
        e.due = cycles + 1 + LAT; e.mv = m; e.hd = ref_head; e.st = ref_steps;
        q.push_back(e);
      end else begin
        sample(w);
      end
      if ($urandom % 4 == 0) begin
        @(negedge clk); sens_valid = 0;
      end
    end
    @(negedge clk); sens_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #1 rst_n = 0;
    #12 rst_n = 1;
    // fault-free
    burst(200);
    // single persistent faults, every site and every copy
    for (int r = 0; r < 12 * 3 * 4; r++) begin
      int w;
      fi_site = fsite_e'(r % 12);
      fi_copy = 2'((r / 12) % 3);
      case (fi_site)
        FS_SENS_REG, FS_AND_LEFT, FS_AND_FRONT, FS_AND_RIGHT: w = 3;
        FS_STEP_INC, FS_STEP_REG: w = STEP_W;
        default: w = 2;
      endcase
      fi_bit = 4'($urandom % w);
      err_seen = 0;
      @(negedge clk); fi_en = 1;
      burst(20);
      checks++;
      if (err_seen == 0) begin
        failures++; $display("FAIL no tmr_err for site %0d", fi_site);
      end else site_cnt[fi_site]++;
      @(negedge clk); fi_en = 0;
      repeat (2) @(negedge clk);
      burst(5);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d answers missing", q.size()); end
    // the control path is single-copy: an inverted valid flag must show up as
    // answers without samples, one clock later for the output flag and two
    // clocks later for the decision flag
    ctrl_test = 1;
    for (int c = 0; c < 2; c++) begin
      fi_site = (c == 0) ? FS_CTRL_OUT : FS_CTRL_DEC;
      spurious = 0;
      @(negedge clk); fi_en = 1;
      repeat (4) @(negedge clk);
      fi_en = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (spurious != 4) begin
        failures++; $display("FAIL control fault %0d gave %0d spurious answers, exp 4", c, spurious);
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (move_cnt[i] == 0) begin failures++; $display("FAIL move %0d never taken", i); end
    end
    for (int i = 0; i < int'(N_DATA_FSITES); i++) begin
      checks++;
      if (site_cnt[i] == 0) begin failures++; $display("FAIL site %0d never exercised", i); end
    end
    $display("moves L/F/R/B = %0d/%0d/%0d/%0d", move_cnt[MV_LEFT], move_cnt[MV_FORWARD],
             move_cnt[MV_RIGHT], move_cnt[MV_BACK]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
