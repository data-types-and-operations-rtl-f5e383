// tmr_binop: triplicated binary operator of a TMR redundant data type.
//
// The first operand is a TMR value (three copies). The operator is built as
// three copies M1..M3 of the original operator, each followed into one of
// three voters whose majority result goes back to the matching copy. Where
// the second operand comes from is fixed by B_SRC:
//   SRC_TMR    intra-type: copy i of the second TMR operand feeds M(i+1);
//   SRC_DUPLEX inter-type: the two copies of a duplex operand pass a
//              compare/switch stage (duplex_cs) whose output feeds M1..M3;
//   SRC_PLAIN  original-type: the unhardened operand feeds M1..M3 directly.
// The three cases and the structure follow the hardening method; the operator
// set, unsigned arithmetic, the error flags and the fault input are this
// design's choices. Inputs of the two unused sources are ignored.
//
// fault is XORed into the result of operator copy i before voting; it models
// a persistent upset in that copy's logic (all zero in normal use).
// Purely combinational.
module tmr_binop
  import rdt_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter src_e        B_SRC = SRC_TMR
) (
  input  binop_e            op,
  input  logic [2:0][W-1:0] a,         // first operand, TMR
  input  logic [2:0][W-1:0] b_tmr,     // second operand if B_SRC == SRC_TMR
  input  logic [1:0][W-1:0] b_dup,     // second operand if B_SRC == SRC_DUPLEX
  input  logic [W-1:0]      b_plain,   // second operand if B_SRC == SRC_PLAIN
  input  logic [2:0][W-1:0] fault,     // per-copy result flips (fault injection)
  output logic [2:0][W-1:0] y,         // voted result, one per copy
  output logic              mismatch,  // the operator copies disagreed
  output logic              dup_mismatch // duplex copies disagreed (SRC_DUPLEX)
);

  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1;

  logic [2:0][W-1:0] b;     // second operand as seen by each copy
  logic [2:0][W-1:0] r;     // operator copy results
  logic [2:0]        vmis;

  if (B_SRC == SRC_DUPLEX) begin : g_dup
    logic [W-1:0] b_sw;
    duplex_cs #(.W(W)) u_cs (.d(b_dup), .y(b_sw), .mismatch(dup_mismatch));
    assign b = {3{b_sw}};
  end else if (B_SRC == SRC_PLAIN) begin : g_plain
    assign b            = {3{b_plain}};
    assign dup_mismatch = 1'b0;
  end else begin : g_tmr
    assign b            = b_tmr;
    assign dup_mismatch = 1'b0;
  end

  for (genvar i = 0; i < 3; i++) begin : g_op
    logic [W-1:0] m;
    always_comb begin
      unique case (op)
        OP_ADD:  m = a[i] + b[i];
        OP_SUB:  m = a[i] - b[i];
        OP_MUL:  m = a[i] * b[i];
        OP_AND:  m = a[i] & b[i];
        OP_OR:   m = a[i] | b[i];
        OP_XOR:  m = a[i] ^ b[i];
        OP_SHL:  m = a[i] << b[i][SW-1:0];
        OP_SHR:  m = a[i] >> b[i][SW-1:0];
        OP_EQ:   m = W'(a[i] == b[i]);
        OP_NE:   m = W'(a[i] != b[i]);
        OP_LT:   m = W'(a[i] <  b[i]);
        default: m = '0;
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
