// tb_correction_cell: exhaustive test of one correcting-section cell for the
// Hamming (15,11) code. For each of the 16 input syndromes and both received
// bit values, the output carries must equal D*s(D) mod g(D) (computed by long
// division) and the bit must be complemented only for syndrome 4'b1000.
module tb_correction_cell;
  import cyclic_ref_pkg::*;
  logic [3:0] y, Y;
  logic       w, c, hit;
  logic [63:0] ref_Y;
  int checks = 0, failures = 0;

  correction_cell #(.R(4), .G(4'b0011), .PATTERN(4'b1000)) dut (
    .y(y), .w(w), .Y(Y), .c(c), .hit(hit));

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
      ref_Y = poly_mod(64'(y) << 1, 64'b10011, 4);
      checks++;
      if (Y !== ref_Y[3:0]) begin
        failures++;
        $display("FAIL shift y=%b Y=%b expected %b", y, Y, ref_Y[3:0]);
      end
      checks++;
      if (c !== (w ^ (y == 4'd8)) || hit !== (y == 4'd8)) begin
        failures++;
        $display("FAIL gate y=%b w=%b c=%b hit=%b", y, w, c, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
