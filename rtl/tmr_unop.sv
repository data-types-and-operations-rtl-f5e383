// tmr_unop: triplicated unary operator of a TMR redundant data type.
//
// For a unary operator of the original type the hardened operator is three
// copies of it, one per nested copy of the operand, followed by a vote whose
// majority result is handed back to every copy. This module is the
// combinational part: operator copies M1..M3 and one voter per result copy.
// The operator set (negate, bitwise not, logical not, increment, decrement)
// covers the C++ unary operators of an unsigned integer; it and the
// fault-injection input are this design's choices.
//
// fault is XORed into the result of operator copy i before voting; it models
// a persistent upset in that copy's logic (all zero in normal use).
// Purely combinational.
module tmr_unop
  import rdt_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  unop_e             op,
  input  logic [2:0][W-1:0] a,        // three copies of the operand
  input  logic [2:0][W-1:0] fault,    // per-copy result flips (fault injection)
  output logic [2:0][W-1:0] y,        // voted result, one per copy
  output logic              mismatch  // the operator copies disagreed
);

  logic [2:0][W-1:0] r;
  logic [2:0]        vmis;

  for (genvar i = 0; i < 3; i++) begin : g_op
    logic [W-1:0] m;
    always_comb begin
      unique case (op)
        UOP_NEG:  m = -a[i];
        UOP_NOT:  m = ~a[i];
        UOP_LNOT: m = W'(a[i] == '0);
        UOP_INC:  m = a[i] + W'(1);
        UOP_DEC:  m = a[i] - W'(1);
        default:  m = a[i];
      endcase
      r[i] = m ^ fault[i];
    end
  end

  for (genvar i = 0; i < 3; i++) begin : g_vote
    tmr_voter #(.W(W)) u_vote (
      .a(r[0]), .b(r[1]), .c(r[2]), .y(y[i]), .mismatch(vmis[i])
    );
  end

  assign mismatch = |vmis;

endmodule
