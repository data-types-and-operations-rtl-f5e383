// tb_tmr_cond: self-checking test of the TMR conditional operator.
//
// Checks that the condition is cast to Boolean by majority (one corrupted
// condition copy cannot change the decision), that the selected value reaches
// all three copies, and that a fault in one selected copy is voted out.
module tb_tmr_cond;
  localparam int unsigned W = 8, CW = 4;
  logic [2:0][CW-1:0] cond;
  logic [2:0][W-1:0]  a, b, f, y;
  logic               sel, mis;
  int checks = 0, failures = 0;

  tmr_cond #(.W(W), .CW(CW)) dut (.cond, .a, .b, .fault(f), .sel, .y, .mismatch(mis));

  task automatic chk(input string what, input logic es, input logic [W-1:0] e, input logic em);
    #1;
    checks++;
    if (sel !== es || y[0] !== e || y[1] !== e || y[2] !== e || mis !== em) begin
      failures++;
      $display("FAIL %s cond=%h/%h/%h sel=%b exp %b y=%h/%h/%h exp %h mis=%b exp %b",
               what, cond[0], cond[1], cond[2], sel, es, y[0], y[1], y[2], e, mis, em);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] c;
    logic [W-1:0]  va, vb;
    logic          t;
    int k;
    for (int n = 0; n < 400; n++) begin
      c  = (n % 2 == 0) ? '0 : (CW'($urandom) | CW'(1));
      t  = (c != 0);
      va = W'($urandom); vb = W'($urandom);
      cond = {3{c}}; a = {3{va}}; b = {3{vb}}; f = '0;
      chk("clean", t, t ? va : vb, 1'b0);
      // one condition copy inverted to the opposite truth value
      k = n % 3;
      cond[k] = t ? '0 : CW'(1 << (n % CW));
      chk("cond copy corrupted", t, t ? va : vb, 1'b1);
      cond = {3{c}};
      f[k] = W'($urandom) | W'(1);
      chk("select copy fault", t, t ? va : vb, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
