// tb_vma: vector merging adder. Directed corner cases and random vectors;
// the result must be (sum_vec + carry_vec) mod 2^W, computed here with
// integer arithmetic.
module tb_vma;
  localparam int W = 9;
  logic [W-1:0] s, c, r;
  int checks = 0, failures = 0;

  vma #(.W(W)) dut (.sum_vec(s), .carry_vec(c), .result(r));

  task automatic check(input int sv, input int cv);
    s = W'(sv);
    c = W'(cv);
    #1;
    checks++;
    if (int'(r) != ((sv + cv) % (1 << W))) begin
      failures++;
      $display("FAIL %0d + %0d -> %0d", sv, cv, r);
    end
  endtask

  initial begin
    check(0, 0);
    check((1 << W) - 1, 1);
    check((1 << W) - 1, (1 << W) - 1);
    check(170, 85);
    for (int i = 0; i < 2000; i++) check(int'($urandom % (1 << W)), int'($urandom % (1 << W)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
