// tmr_cond: conditional (ternary) operator on TMR redundant data types.
//
// "cond ? a : b" needs one decision, so the TMR condition is cast to the
// Boolean type: its three copies are voted and the majority is tested against
// zero. That single decision then selects, copy by copy, between the two TMR
// operands, and the three selected copies go through one voter each. The cast
// to Boolean is the method's; voting the selected copies and the fault input
// are this design's choices.
//
// fault is XORed into selected copy i before voting; it models a persistent
// upset in that copy's multiplexer (all zero in normal use).
// Purely combinational.
module tmr_cond #(
  parameter int unsigned W  = 32,  // width of the selected values
  parameter int unsigned CW = 32   // width of the condition
) (
  input  logic [2:0][CW-1:0] cond,     // three copies of the condition
  input  logic [2:0][W-1:0]  a,        // taken when the condition is true
  input  logic [2:0][W-1:0]  b,        // taken when it is false
  input  logic [2:0][W-1:0]  fault,    // per-copy flips (fault injection)
  output logic               sel,      // the condition cast to Boolean
  output logic [2:0][W-1:0]  y,        // voted selection, one per copy
  output logic               mismatch  // condition or selected copies disagreed
);

  logic [CW-1:0]     cond_v;
  logic              cmis;
  logic [2:0][W-1:0] r;
  logic [2:0]        vmis;

  tmr_voter #(.W(CW)) u_cast (
    .a(cond[0]), .b(cond[1]), .c(cond[2]), .y(cond_v), .mismatch(cmis)
  );

  assign sel = (cond_v != '0);

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      r[i] = (sel ? a[i] : b[i]) ^ fault[i];
    end
  end

  for (genvar i = 0; i < 3; i++) begin : g_vote
    tmr_voter #(.W(W)) u_vote (
      .a(r[0]), .b(r[1]), .c(r[2]), .y(y[i]), .mismatch(vmis[i])
    );
  end

  assign mismatch = cmis | (|vmis);

endmodule
