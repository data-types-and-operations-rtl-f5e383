// tmr_voter: bitwise two-out-of-three majority voter.
//
// This is the vote step of a triple-modular-redundant (TMR) value: the three
// copies a, b and c are combined bit by bit and each output bit takes the value
// that at least two copies agree on, so any fault confined to one copy is
// masked. The voter itself follows the hardening method; voting bit by bit
// (rather than choosing a whole word) and the extra mismatch flag, which is
// high whenever the three copies are not all equal, are this design's choices.
// Purely combinational, no clock.
module tmr_voter #(
  parameter int unsigned W = 32   // width of the original data type (C++ int)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,         // majority value
  output logic         mismatch   // some copy differs from the others
);

  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end

endmodule
