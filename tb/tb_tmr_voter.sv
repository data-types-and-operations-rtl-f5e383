// tb_tmr_voter: self-checking test of the bitwise majority voter.
//
// Drives random triples and triples in which one copy is corrupted, and
// compares the output with a per-bit count of ones (majority when at least two
// copies hold 1) and the mismatch flag with a direct equality test.
module tb_tmr_voter;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, c, y;
  logic         mis;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a, .b, .c, .y, .mismatch(mis));

  task automatic check(input logic [W-1:0] exp_y, input logic exp_m);
    #1;
    checks++;
    if (y !== exp_y || mis !== exp_m) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h y=%h exp %h mis=%b exp %b", a, b, c, y, exp_y, mis, exp_m);
    end
  endtask

  function automatic logic [W-1:0] ref_maj(input logic [W-1:0] p, q, r);
    logic [W-1:0] m;
    for (int i = 0; i < int'(W); i++) m[i] = (int'(p[i]) + int'(q[i]) + int'(r[i])) >= 2;
    return m;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    // all equal
    for (int n = 0; n < 50; n++) begin
      v = $urandom; a = v; b = v; c = v;
      check(v, 1'b0);
    end
    // one copy corrupted: the good value must win
    for (int n = 0; n < 300; n++) begin
      v = $urandom; a = v; b = v; c = v;
      case (n % 3)
        0: a = v ^ ($urandom | 1);
        1: b = v ^ ($urandom | 1);
        default: c = v ^ ($urandom | 1);
      endcase
      check(v, 1'b1);
    end
    // fully random
    for (int n = 0; n < 300; n++) begin
      a = $urandom; b = $urandom; c = $urandom;
      check(ref_maj(a, b, c), !(a == b && b == c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
