// tmr_reg: storage element of a TMR redundant data type.
//
// The register holds three copies (x, y, z) of a value of the original type.
// A write (we high) stores the three incoming copies, which the producing
// triplicated operator has already voted; a plain constant or an unhardened
// value is written by repeating it into all three copies. In every cycle
// without a write, each copy is rewritten from its own majority voter, so an
// upset in one copy lasts at most one cycle. Three copies and the voted
// write-back follow the hardening method; refreshing on every idle cycle, the
// reset value and the fault-injection input are this design's choices.
//
// upset models a single-event upset for fault-injection experiments: it is
// XORed into the value clocked into each copy (all zero in normal use).
// Timing: q changes on the rising clock edge; rst_n is asynchronous, active low.
module tmr_reg #(
  parameter int unsigned W         = 32,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [2:0][W-1:0] d,        // three copies to store
  input  logic [2:0][W-1:0] upset,    // per-copy bit flips (fault injection)
  output logic [2:0][W-1:0] q,        // three stored copies
  output logic             mismatch   // stored copies currently disagree
);

  logic [2:0][W-1:0] voted;
  logic [2:0]        vmis;

  // One voter per copy, as for the result of a triplicated operator.
  for (genvar i = 0; i < 3; i++) begin : g_vote
    tmr_voter #(.W(W)) u_vote (
      .a(q[0]), .b(q[1]), .c(q[2]), .y(voted[i]), .mismatch(vmis[i])
    );
  end

  assign mismatch = |vmis;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= {3{RESET_VAL}};
    end else begin
      for (int i = 0; i < 3; i++) begin
        q[i] <= (we ? d[i] : voted[i]) ^ upset[i];
      end
    end
  end

endmodule
