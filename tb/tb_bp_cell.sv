// tb_bp_cell: exhaustive test of the array cell. All 16 input combinations
// are applied and the outputs compared with the arithmetic meaning of the
// cell: {carry,sum} must equal a + b + (x AND c) as a 2-bit number.
module tb_bp_cell;
  logic a, b, x, c, sum, carry;
  int checks = 0, failures = 0;

  bp_cell dut (.a(a), .b(b), .x(x), .c(c), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, x, c} = 4'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b) + int'(x && c))) begin
        failures++;
        $display("FAIL a=%0d b=%0d x=%0d c=%0d -> carry=%0d sum=%0d", a, b, x, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
