// tb_cyclic_cell: exhaustive test of one iterative cell for the Hamming
// (15,11) generator D^4 + D + 1. Every one of the 32 combinations of the input
// bit and the four input carries is applied and the output carries are
// compared with the cell equations written out for this code:
// Y0 = y3 ^ x, Y1 = y0 ^ Y0, Y2 = y1, Y3 = y2. The cell is combinational, so
// the outputs are checked 1 time unit after the inputs change.
module tb_cyclic_cell;
  logic       x;
  logic [3:0] y, Y, exp_Y;
  int checks = 0, failures = 0;

  cyclic_cell #(.R(4), .G(4'b0011)) dut (.x(x), .y(y), .Y(Y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {x, y} = 5'(v);
      #1;
      exp_Y[0] = y[3] ^ x;
      exp_Y[1] = y[0] ^ exp_Y[0];
      exp_Y[2] = y[1];
      exp_Y[3] = y[2];
      checks++;
      if (Y !== exp_Y) begin
        failures++;
        $display("FAIL x=%b y=%b Y=%b expected %b", x, y, Y, exp_Y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
