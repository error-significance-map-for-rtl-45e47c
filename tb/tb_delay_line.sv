// tb_delay_line: a 5-bit, 3-stage delay line (the input-bus delay of one
// bit-plane with k_C = 3). Random words go in every clock; each must come
// out exactly DEPTH clocks later, and the line must read zero after reset.
module tb_delay_line;
  localparam int WIDTH = 5;
  localparam int DEPTH = 3;
  logic clk, rst_n;
  logic [WIDTH-1:0] d, q;
  logic [WIDTH-1:0] hist [512];
  int checks = 0, failures = 0;

  initial begin
    clk   = 1'b0;
    rst_n = 1'b0;
    d     = '0;
  end
  always #5 clk = ~clk;

  delay_line #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL not cleared by reset"); end
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      d = WIDTH'($urandom);
      hist[cyc] = d;
      @(posedge clk);
      #1;
      // after edge cyc, q holds the word applied before edge cyc-DEPTH+1
      if (cyc >= DEPTH - 1) begin
        checks++;
        if (q != hist[cyc-DEPTH+1]) begin
          failures++;
          $display("FAIL cyc %0d q=%0h expected %0h", cyc, q, hist[cyc-DEPTH+1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
