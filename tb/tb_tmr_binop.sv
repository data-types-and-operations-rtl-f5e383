// tb_tmr_binop: self-checking test of the triplicated binary operator.
//
// Three instances cover the three sources of the second operand (TMR, duplex,
// unhardened). For every operator code, random operands are applied and each
// copy of the result is compared with a reference computed here. Then a
// persistent fault is put into one operator copy, or one copy of a TMR
// operand is corrupted: the voted result must stay correct and mismatch must
// rise. Differing duplex copies must raise dup_mismatch and use copy 0.
module tb_tmr_binop;
  import rdt_pkg::*;
  localparam int unsigned W = 16;

  binop_e            op;
  logic [2:0][W-1:0] a, bt, ft, fd, fp, yt, yd, yp;
  logic [1:0][W-1:0] bd;
  logic [W-1:0]      bp;
  logic              mt, md, mp, dm_t, dm_d, dm_p;
  int checks = 0, failures = 0;

  tmr_binop #(.W(W), .B_SRC(SRC_TMR)) u_t (
    .op, .a, .b_tmr(bt), .b_dup('0), .b_plain('0), .fault(ft), .y(yt),
    .mismatch(mt), .dup_mismatch(dm_t));
  tmr_binop #(.W(W), .B_SRC(SRC_DUPLEX)) u_d (
    .op, .a, .b_tmr('0), .b_dup(bd), .b_plain('0), .fault(fd), .y(yd),
    .mismatch(md), .dup_mismatch(dm_d));
  tmr_binop #(.W(W), .B_SRC(SRC_PLAIN)) u_p (
    .op, .a, .b_tmr('0), .b_dup('0), .b_plain(bp), .fault(fp), .y(yp),
    .mismatch(mp), .dup_mismatch(dm_p));

  function automatic logic [W-1:0] ref_op(input binop_e o, input logic [W-1:0] x, z);
    int unsigned sh;
    sh = int'(z) % W;
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_MUL: return W'(32'(x) * 32'(z));
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return x ^ z;
      OP_SHL: return x << sh;
      OP_SHR: return x >> sh;
      OP_EQ:  return (x == z) ? W'(1) : W'(0);
      OP_NE:  return (x != z) ? W'(1) : W'(0);
      OP_LT:  return (x < z) ? W'(1) : W'(0);
      default: return '0;
    endcase
  endfunction

  task automatic chk3(input string what, input logic [2:0][W-1:0] y,
                      input logic [W-1:0] e, input logic m, input logic em);
    checks++;
    if (y[0] !== e || y[1] !== e || y[2] !== e || m !== em) begin
      failures++;
      $display("FAIL %s op=%0d a=%h y=%h/%h/%h exp %h mis=%b exp %b",
               what, op, a[0], y[0], y[1], y[2], e, m, em);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] va, vb, e, r;
    int k;
    ft = '0; fd = '0; fp = '0;
    for (int n = 0; n < 1100; n++) begin
      op = binop_e'(n % 11);
      va = W'($urandom); vb = W'($urandom);
      if (n % 7 == 0) vb = va;               // exercise EQ/NE true cases
      a = {3{va}}; bt = {3{vb}}; bd = {2{vb}}; bp = vb;
      ft = '0; fd = '0; fp = '0;
      #1;
      r = ref_op(op, va, vb);
      chk3("tmr clean", yt, r, mt, 1'b0);
      chk3("dup clean", yd, r, md, 1'b0);
      chk3("plain clean", yp, r, mp, 1'b0);
      checks++;
      if (dm_d || dm_t || dm_p) begin failures++; $display("FAIL dup flag clean"); end
      // persistent fault in one operator copy
      k = n % 3;
      e = W'($urandom) | W'(1);
      ft[k] = e; fd[k] = e; fp[k] = e;
      #1;
      chk3("tmr fault", yt, r, mt, 1'b1);
      chk3("dup fault", yd, r, md, 1'b1);
      chk3("plain fault", yp, r, mp, 1'b1);
      ft = '0; fd = '0; fp = '0;
      // one corrupted copy of the first operand (and of the TMR second operand)
      a[k] = va ^ e;
      bt[(k+1)%3] = vb ^ e;
      #1;
      // copies k and k+1 compute wrong values, copy k+2 is right: two wrong
      // inputs in different copies can defeat TMR, so only check the
      // single-corruption case on a, with b clean
      bt = {3{vb}};
      #1;
      checks++;
      if (yt[0] !== r || yt[1] !== r || yt[2] !== r) begin
        failures++; $display("FAIL tmr operand corruption op=%0d", op);
      end
      a = {3{va}};
      // duplex copies disagree: copy 0 is used
      bd[1] = vb ^ e;
      #1;
      checks++;
      if (!dm_d || yd[0] !== r || yd[1] !== r || yd[2] !== r) begin
        failures++; $display("FAIL duplex mismatch op=%0d dm=%b", op, dm_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
