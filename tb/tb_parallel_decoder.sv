// tb_parallel_decoder: exhaustive single-error test of the Hamming (15,11)
// parallel decoder. Each of the 2048 code words (built by long division, not
// by the encoder) is applied clean and with each of the 15 single-bit errors:
// the corrected word and message must equal the original, the syndrome must
// equal D^4 e(D) mod g(D), and the error / corrected flags must be set exactly
// when an error was injected. 512 random double errors must be flagged as
// errors (they cannot be corrected). Results are checked 1 time unit after the
// word is applied: the decoder has no clock and zero cycles of latency.
// A second instance, set to the Hamming (7,4) code with g(D) = D^3 + D + 1,
// is run through the same clean and single-error cases to check that the
// cell structure and the derived correcting pattern hold for other codes.
module tb_parallel_decoder;
  import cyclic_ref_pkg::*;
  localparam logic [63:0] GFULL = 64'b10011;
  logic [14:0] w, c, cw, err;
  logic [10:0] msg;
  logic [3:0]  syndrome;
  logic        error_detected, corrected;
  logic [63:0] ref_chk, ref_s;
  int checks = 0, failures = 0;
  int a, b;
  logic [6:0]  w7, c7, cw7;
  logic [3:0]  msg7;
  logic [2:0]  s7;
  logic        det7, cor7;

  parallel_decoder #(.N(4), .R(3), .G(3'b011)) dut7 (
    .w(w7), .c(c7), .msg(msg7), .syndrome(s7), .error_detected(det7), .corrected(cor7));

  parallel_decoder dut (.w(w), .c(c), .msg(msg), .syndrome(syndrome),
                        .error_detected(error_detected), .corrected(corrected));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2048; m++) begin
      ref_chk = check_bits(64'(m), GFULL, 4);
      cw = {11'(m), ref_chk[3:0]};
      for (int e = 0; e <= 15; e++) begin
        err = (e == 0) ? '0 : 15'(1) << (e - 1);
        w = cw ^ err;
        #1;
        ref_s = check_bits(64'(err), GFULL, 4);
        checks++;
        if (c !== cw || msg !== 11'(m) || syndrome !== ref_s[3:0] ||
            error_detected !== (e != 0) || corrected !== (e != 0)) begin
          failures++;
          $display("FAIL cw=%b err=%b c=%b msg=%b s=%b det=%b cor=%b",
                   cw, err, c, msg, syndrome, error_detected, corrected);
        end
      end
    end
    for (int t = 0; t < 512; t++) begin
      cw = {11'($urandom % 2048), 4'b0};
      ref_chk = check_bits(64'(cw[14:4]), GFULL, 4);
      cw[3:0] = ref_chk[3:0];
      a = int'($urandom % 15);
      b = (a + 1 + int'($urandom % 14)) % 15;
      w = cw ^ (15'(1) << a) ^ (15'(1) << b);
      #1;
      checks++;
      if (!error_detected || c === cw) begin
        failures++;
        $display("FAIL double error %0d,%0d on %b: det=%b c=%b", a, b, cw, error_detected, c);
      end
    end
    for (int m = 0; m < 16; m++) begin
      ref_chk = check_bits(64'(m), 64'b1011, 3);
      cw7 = {4'(m), ref_chk[2:0]};
      for (int e = 0; e <= 7; e++) begin
        w7 = cw7 ^ ((e == 0) ? 7'b0 : 7'(1) << (e - 1));
        #1;
        checks++;
        if (c7 !== cw7 || msg7 !== 4'(m) || det7 !== (e != 0) || cor7 !== (e != 0)) begin
          failures++;
          $display("FAIL (7,4) cw=%b w=%b c=%b det=%b cor=%b", cw7, w7, c7, det7, cor7);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
