// tb_tmr_reg: self-checking test of the TMR storage element.
//
// Checks reset, writes of three equal copies, that a single-copy upset is
// masked at the voter and scrubbed by the voted write-back on the next idle
// clock (one cycle), and that an upset arriving together with a write lands
// only in the upset copy. A scoreboard holds the expected value.
module tb_tmr_reg;
  localparam int unsigned W = 8;
  logic             clk = 0, rst_n = 1, we = 0;
  logic [2:0][W-1:0] d = '0, upset = '0, q;
  logic             mis;
  logic [W-1:0]     qv;
  logic             qmis;
  int checks = 0, failures = 0, cycles = 0;

  tmr_reg #(.W(W), .RESET_VAL(8'h5A)) dut (.clk, .rst_n, .we, .d, .upset, .q, .mismatch(mis));
  tmr_voter #(.W(W)) u_v (.a(q[0]), .b(q[1]), .c(q[2]), .y(qv), .mismatch(qmis));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d: q=%h/%h/%h", what, cycles, q[0], q[1], q[2]);
    end
  endtask

  initial begin
    logic [W-1:0] v, e;
    int k;
    #1 rst_n = 0;
    #1;
    chk("reset value", q[0] == 8'h5A && q[1] == 8'h5A && q[2] == 8'h5A);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      // write a new value
      v = W'($urandom);
      @(negedge clk); we = 1; d = {3{v}};
      @(negedge clk); we = 0;
      chk("write", q[0] == v && q[1] == v && q[2] == v && !mis);
      // upset one copy for one clock
      k = n % 3;
      e = W'($urandom) | W'(1);
      upset[k] = e;
      @(negedge clk); upset = '0;
      chk("upset lands in one copy", q[k] == (v ^ e) && q[(k+1)%3] == v && q[(k+2)%3] == v);
      chk("upset masked by vote", qv == v && mis);
      @(negedge clk);
      chk("scrubbed after one cycle", q[0] == v && q[1] == v && q[2] == v && !mis);
      // upset together with a write
      @(negedge clk); we = 1; d = {3{~v}}; upset[k] = e;
      @(negedge clk); we = 0; upset = '0;
      chk("write with upset", q[k] == (~v ^ e) && qv == ~v);
      @(negedge clk);
      chk("scrub after write", q[0] == ~v && q[1] == ~v && q[2] == ~v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
