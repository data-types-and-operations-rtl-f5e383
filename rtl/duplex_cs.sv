// duplex_cs: compare/switch stage between a duplex operand and a TMR operator.
//
// When a binary operator of a TMR value takes its second operand from a
// subsystem hardened by duplication (two copies), that operand passes a
// compare/switch ("C/SW") stage whose single output feeds all three operator
// copies. The stage compares the two copies and switches one of them through.
// Two copies cannot outvote each other, so when they differ the stage cannot
// tell the faulty one: this design then passes copy 0 and raises mismatch for
// whoever monitors the duplex subsystem. That selection rule and the flag are
// this design's own choice; only the block's place and name come from the
// method. Purely combinational.
module duplex_cs #(
  parameter int unsigned W = 32
) (
  input  logic [1:0][W-1:0] d,        // the two copies of the duplex value
  output logic [W-1:0]      y,        // value handed to the TMR operator
  output logic              mismatch  // the two copies disagree
);

  always_comb begin
    mismatch = (d[0] != d[1]);
    y        = d[0];
  end

endmodule
