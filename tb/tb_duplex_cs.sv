// tb_duplex_cs: self-checking test of the duplex compare/switch stage.
//
// With equal copies the stage must pass the value and keep mismatch low; with
// differing copies it must raise mismatch and pass copy 0.
module tb_duplex_cs;
  localparam int unsigned W = 16;
  logic [1:0][W-1:0] d;
  logic [W-1:0]      y;
  logic              mis;
  int checks = 0, failures = 0;

  duplex_cs #(.W(W)) dut (.d, .y, .mismatch(mis));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, e;
    for (int n = 0; n < 200; n++) begin
      v = W'($urandom);
      e = (n % 2 == 0) ? '0 : (W'($urandom) | W'(1));
      d[0] = v; d[1] = v ^ e;
      #1;
      checks++;
      if (y !== v || mis !== (e != '0)) begin
        failures++;
        $display("FAIL d0=%h d1=%h y=%h mis=%b", d[0], d[1], y, mis);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
