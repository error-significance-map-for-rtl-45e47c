// tb_bit_plane: one bit-plane with k_C = 3 rows of l_0 = 9 cells.
// Every clock a new random sum vector, carry vector, input word and set of
// coefficient bits is applied. The carry-save pair leaving the last row,
// read as sum_out + 2*carry_out, must equal
//   sum_in + carry_in + sum over rows r of cbits[KC-1-r]*xw   (mod 2^L0)
// where row r uses the xw and cbits present r clocks after the word
// entered, and it must appear KC clocks after the word entered.
module tb_bit_plane;
  localparam int KC = 3;
  localparam int L0 = 9;
  localparam int NCYC = 3000;
  localparam int MOD = 1 << L0;

  logic clk, rst_n;
  logic [L0-1:0] sum_in, carry_in, xw, sum_out, carry_out;
  logic [KC-1:0] cbits;
  int h_s [NCYC], h_c [NCYC], h_x [NCYC], h_b [NCYC];
  int checks = 0, failures = 0;

  initial begin
    clk   = 1'b0;
    rst_n = 1'b0;
    sum_in   = '0;
    carry_in = '0;
    xw       = '0;
    cbits    = '0;
  end
  always #5 clk = ~clk;

  bit_plane #(.KC(KC), .L0(L0)) dut (
    .clk(clk), .rst_n(rst_n), .sum_in(sum_in), .carry_in(carry_in), .xw(xw),
    .cbits(cbits), .sum_out(sum_out), .carry_out(carry_out)
  );

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sum_out != '0 || carry_out != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      sum_in   = L0'($urandom);
      carry_in = L0'($urandom);
      xw       = L0'($urandom);
      cbits    = KC'($urandom);
      h_s[cyc] = int'(sum_in);
      h_c[cyc] = int'(carry_in);
      h_x[cyc] = int'(xw);
      h_b[cyc] = int'(cbits);
      @(posedge clk);
      #1;
      if (cyc >= KC - 1) begin
        int e0, exp_v, got;
        e0 = cyc - KC + 1;
        exp_v = h_s[e0] + h_c[e0];
        for (int r = 0; r < KC; r++)
          if (h_b[e0+r][KC-1-r]) exp_v += h_x[e0+r];
        exp_v = exp_v % MOD;
        got = (int'(sum_out) + 2 * int'(carry_out)) % MOD;
        checks++;
        if (got != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d got %0d expected %0d", cyc, got, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
