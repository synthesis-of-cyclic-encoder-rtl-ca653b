// tb_parallel_encoder: exhaustive test of the Hamming (15,11) parallel
// encoder. All 2048 message words are applied; the check bits must equal
// D^4 x(D) mod g(D) found by long division, the code word must be
// {message, check} and divisible by g(D). The worked example 10100000000 must
// give check bits 0110 (hand computed: D^14 + D^12 = D^2 + D mod g).
// The encoder has no clock: every result is checked 1 time unit after its
// message is applied, i.e. with zero cycles of latency.
module tb_parallel_encoder;
  import cyclic_ref_pkg::*;
  localparam logic [63:0] GFULL = 64'b10011;
  logic [10:0] msg;
  logic [3:0]  check;
  logic [14:0] word;
  logic [63:0] ref_check;
  int checks = 0, failures = 0;

  parallel_encoder dut (.msg(msg), .check(check), .word(word));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg = 11'b10100000000;
    #1;
    checks++;
    if (word !== 15'b10100000000_0110) begin
      failures++;
      $display("FAIL example word=%b", word);
    end
    for (int m = 0; m < 2048; m++) begin
      msg = 11'(m);
      #1;
      ref_check = check_bits(64'(msg), GFULL, 4);
      checks++;
      if (check !== ref_check[3:0] || word !== {msg, ref_check[3:0]}) begin
        failures++;
        $display("FAIL msg=%b check=%b expected %b", msg, check, ref_check[3:0]);
      end
      checks++;
      if (poly_mod(64'(word), GFULL, 4) != 0) begin
        failures++;
        $display("FAIL word %b is not a multiple of g", word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
