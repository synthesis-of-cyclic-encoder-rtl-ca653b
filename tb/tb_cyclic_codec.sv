// tb_cyclic_codec: end-to-end test of the Hamming (15,11) codec at its
// default parameters. Every message word is encoded by the transmitter side,
// sent through a channel that adds no error, every single-bit error and every
// double-bit error, and decoded by the receiver side.
//  - the code word must be {message, D^4 x(D) mod g(D)} (long division);
//  - clean and single-error words must come back as the original message;
//  - double errors must be flagged as errors.
// Mechanisms counted, each must occur: clean word accepted, error detected,
// correction at every one of the 15 bit positions, double error flagged.
// Both halves are combinational, so each result is checked 1 time unit after
// the inputs change (zero cycles of latency).
module tb_cyclic_codec;
  import cyclic_ref_pkg::*;
  localparam logic [63:0] GFULL = 64'b10011;
  logic [10:0] tx_msg, rx_msg;
  logic [3:0]  tx_check, rx_syndrome;
  logic [14:0] tx_word, rx_word, rx_corrected, err;
  logic        rx_error, rx_fixed;
  logic [63:0] ref_chk;
  int checks = 0, failures = 0;
  int n_clean = 0, n_detect = 0, n_double = 0;
  int n_fix [15];

  cyclic_codec dut (
    .tx_msg(tx_msg), .tx_check(tx_check), .tx_word(tx_word),
    .rx_word(rx_word), .rx_corrected(rx_corrected), .rx_msg(rx_msg),
    .rx_syndrome(rx_syndrome), .rx_error(rx_error), .rx_fixed(rx_fixed));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [14:0] e, input int nerr);
    err     = e;
    rx_word = tx_word ^ e;
    #1;
    if (nerr < 2) begin
      checks++;
      if (rx_msg !== tx_msg || rx_corrected !== tx_word ||
          rx_error !== (nerr == 1) || rx_fixed !== (nerr == 1)) begin
        failures++;
        $display("FAIL msg=%b err=%b rx_msg=%b det=%b fix=%b", tx_msg, e, rx_msg, rx_error, rx_fixed);
      end
      if (nerr == 0 && !rx_error) n_clean++;
      if (nerr == 1 && rx_error) n_detect++;
      for (int p = 0; p < 15; p++)
        if (nerr == 1 && e[p] && rx_corrected[p] == tx_word[p] && rx_word[p] != tx_word[p])
          n_fix[p]++;
    end else begin
      checks++;
      if (!rx_error) begin
        failures++;
        $display("FAIL double error %b on %b not detected", e, tx_word);
      end else n_double++;
    end
  endtask

  initial begin
    foreach (n_fix[p]) n_fix[p] = 0;
    for (int m = 0; m < 2048; m++) begin
      tx_msg = 11'(m);
      #1;
      ref_chk = check_bits(64'(m), GFULL, 4);
      checks++;
      if (tx_word !== {tx_msg, ref_chk[3:0]} || tx_check !== ref_chk[3:0]) begin
        failures++;
        $display("FAIL encode %b -> %b", tx_msg, tx_word);
      end
      send('0, 0);
      for (int a = 0; a < 15; a++) begin
        send(15'(1) << a, 1);
        for (int b = a + 1; b < 15; b++)
          send((15'(1) << a) | (15'(1) << b), 2);
      end
    end
    $display("mechanisms: clean=%0d detected=%0d double_flagged=%0d", n_clean, n_detect, n_double);
    checks++;
    if (n_clean == 0 || n_detect == 0 || n_double == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int p = 0; p < 15; p++) begin
      $display("corrections at word bit %0d: %0d", p, n_fix[p]);
      checks++;
      if (n_fix[p] == 0) begin
        failures++;
        $display("FAIL no correction at word bit %0d", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
