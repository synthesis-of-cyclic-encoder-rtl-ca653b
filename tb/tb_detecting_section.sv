// tb_detecting_section: exhaustive test of the detecting section of the
// Hamming (15,11) decoder. Every one of the 32768 15-bit words is applied;
// the syndrome must equal D^4 w(D) mod g(D) by long division, and the error
// flag must be set exactly when w(D) is not a multiple of g(D). The 2048
// code words (syndrome zero) are counted and must number exactly 2048.
module tb_detecting_section;
  import cyclic_ref_pkg::*;
  localparam logic [63:0] GFULL = 64'b10011;
  logic [14:0] w;
  logic [3:0]  syndrome;
  logic        error_detected;
  logic [63:0] ref_s;
  int checks = 0, failures = 0, codewords = 0;

  detecting_section dut (.w(w), .syndrome(syndrome), .error_detected(error_detected));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32768; v++) begin
      w = 15'(v);
      #1;
      ref_s = check_bits(64'(w), GFULL, 4);
      checks++;
      if (syndrome !== ref_s[3:0]) begin
        failures++;
        $display("FAIL w=%b syndrome=%b expected %b", w, syndrome, ref_s[3:0]);
      end
      checks++;
      if (error_detected !== (poly_mod(64'(w), GFULL, 4) != 0)) begin
        failures++;
        $display("FAIL w=%b error flag %b", w, error_detected);
      end
      if (!error_detected) codewords++;
    end
    checks++;
    if (codewords != 2048) begin
      failures++;
      $display("FAIL %0d words accepted as code words", codewords);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
