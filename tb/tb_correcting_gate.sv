// tb_correcting_gate: exhaustive test of the correcting gate with the
// Hamming (15,11) pattern 4'b1000. All 16 syndromes are applied with both
// values of the received bit; the bit must be complemented, and `hit` raised,
// for the pattern only.
module tb_correcting_gate;
  logic [3:0] y;
  logic       w, c, hit;
  int checks = 0, failures = 0;

  correcting_gate #(.R(4), .PATTERN(4'b1000)) dut (.y(y), .w(w), .c(c), .hit(hit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {w, y} = 5'(v);
      #1;
      checks++;
      if (c !== (y == 4'd8 ? ~w : w) || hit !== (y == 4'd8)) begin
        failures++;
        $display("FAIL y=%b w=%b c=%b hit=%b", y, w, c, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
