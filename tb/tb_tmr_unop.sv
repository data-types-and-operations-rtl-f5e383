// tb_tmr_unop: self-checking test of the triplicated unary operator.
//
// For every operator code random operands are applied and the three result
// copies are compared with a reference computed here; a persistent fault in
// one operator copy, or one corrupted operand copy, must leave the voted
// result correct and raise mismatch.
module tb_tmr_unop;
  import rdt_pkg::*;
  localparam int unsigned W = 16;
  unop_e             op;
  logic [2:0][W-1:0] a, f, y;
  logic              mis;
  int checks = 0, failures = 0;

  tmr_unop #(.W(W)) dut (.op, .a, .fault(f), .y, .mismatch(mis));

  function automatic logic [W-1:0] ref_op(input unop_e o, input logic [W-1:0] x);
    case (o)
      UOP_NEG:  return W'(0) - x;
      UOP_NOT:  return x ^ {W{1'b1}};
      UOP_LNOT: return (x == 0) ? W'(1) : W'(0);
      UOP_INC:  return x + W'(1);
      UOP_DEC:  return x - W'(1);
      default:  return '0;
    endcase
  endfunction

  task automatic chk(input string what, input logic [W-1:0] e, input logic em);
    #1;
    checks++;
    if (y[0] !== e || y[1] !== e || y[2] !== e || mis !== em) begin
      failures++;
      $display("FAIL %s op=%0d y=%h/%h/%h exp %h mis=%b", what, op, y[0], y[1], y[2], e, mis);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, e;
    int k;
    for (int n = 0; n < 500; n++) begin
      op = unop_e'(n % 5);
      v = (n % 9 == 0) ? '0 : W'($urandom);
      if (n % 13 == 0) v = '1;
      a = {3{v}}; f = '0;
      chk("clean", ref_op(op, v), 1'b0);
      k = n % 3; e = W'($urandom) | W'(1);
      f[k] = e;
      chk("fault", ref_op(op, v), 1'b1);
      f = '0; a[k] = v ^ e;
      #1;
      checks++;
      if (y[0] !== ref_op(op, v) || y[1] !== ref_op(op, v) || y[2] !== ref_op(op, v)) begin
        failures++; $display("FAIL operand corruption op=%0d", op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
