// tb_correcting_section: test of the correcting section of the Hamming
// (15,11) decoder on its own. For each of the 16 syndromes and 64 random
// received words, position i (i = 1 first bit sent, word bit 15-i) must be
// complemented exactly when D^(i-1) s(D) mod g(D) equals D^3, the syndrome a
// single error leaves at its own position. For a syndrome produced by one
// error this selects exactly one position, which is also checked.
module tb_correcting_section;
  import cyclic_ref_pkg::*;
  localparam logic [63:0] GFULL = 64'b10011;
  logic [3:0]  syndrome;
  logic [14:0] w, c, flips, exp_flips;
  logic [63:0] s_i;
  int checks = 0, failures = 0;

  correcting_section dut (.syndrome(syndrome), .w(w), .c(c), .flips(flips));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int t = 0; t < 64; t++) begin
        syndrome = 4'(s);
        w        = 15'($urandom);
        #1;
        for (int i = 1; i <= 15; i++) begin
          s_i = poly_mod(64'(syndrome) << (i - 1), GFULL, 4);
          exp_flips[15-i] = (s_i == 64'b1000);
        end
        checks++;
        if (flips !== exp_flips || c !== (w ^ exp_flips)) begin
          failures++;
          $display("FAIL s=%b w=%b c=%b flips=%b expected %b", syndrome, w, c, flips, exp_flips);
        end
        checks++;
        if ((s != 0) != ($countones(flips) == 1)) begin
          failures++;
          $display("FAIL s=%b flips %b: need exactly one flip for a non-zero syndrome", syndrome, flips);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
