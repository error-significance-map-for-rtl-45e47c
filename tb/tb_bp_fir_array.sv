// tb_bp_fir_array: end-to-end test of the bit-plane FIR filter at its
// default size (k_C = 3 coefficients of m = 4 bits, n = 5-bit two's
// complement input, l_0 = 9 cells per row, 13-bit output).
//
// The filter runs as a stream: one sample per clock. Coefficients are
// reloaded every SEG clocks; after a reload the outputs whose words saw
// the old coefficients are not checked. The first outputs after reset are
// checked as if all samples before reset were zero. Segments alternate between random
// data and directed patterns: impulses (which show the latency and the
// impulse response c_0, c_1, c_2 directly), the most negative input with
// the largest coefficients (result -720) and the most positive one
// (result 675). Every output is compared with y_i = sum_t c_t x_(i-t),
// computed here with integers, exactly (LAT) clocks after x_i went in.
// The low N+M+2 = 11 output bits must match the two's complement result.
// The top two bits are not part of the check (see bp_fir_array); how often
// they differ from a sign extension is printed.
//
// Mechanisms counted, each must occur at least once: negative results
// (input sign extension), duplication of a set sum-vector MSB between
// planes, the vector merging adder dropping its carry out, coefficient
// reloads, and full-scale results at both ends.
module tb_bp_fir_array;
  localparam int KC   = 3;
  localparam int M    = 4;
  localparam int N    = 5;
  localparam int L0   = 9;
  localparam int P    = L0 + M;
  localparam int LAT  = (M - 1) * KC;          // clocks from x_i to y_i
  localparam int WOK  = N + M + $clog2(KC);    // exact low output bits
  localparam int SEG  = 400;
  localparam int NSEG = 50;
  localparam int NCYC = SEG * NSEG;

  logic           clk, rst_n;
  logic [N-1:0]   x;
  logic [M-1:0]   coef [KC];
  logic [P-1:0]   y;

  int xs [NCYC];            // applied samples, signed
  int cf [KC];              // current coefficients
  int seg_start;
  int checks = 0, failures = 0;
  int n_dup, n_vma_wrap;
  int n_neg = 0, n_reload = 0, n_min = 0, n_max = 0;
  int n_impulse = 0, n_upper_diff = 0;

  bp_fir_array dut (.clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .y(y));

  initial begin
    clk   = 1'b0;
    rst_n = 1'b0;
    x     = '0;
    n_dup      = 0;
    n_vma_wrap = 0;
    for (int t = 0; t < KC; t++) coef[t] = '0;
  end
  always #5 clk = ~clk;

  function automatic int signed_x(input logic [N-1:0] v);
    return v[N-1] ? int'(v) - (1 << N) : int'(v);
  endfunction

  // Count array-internal events while data flows.
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < M - 1; j++)
      if (dut.sum_out[j][L0-1]) n_dup <= n_dup + 1;
    if ((int'({dut.sum_out[M-1][L0-1], dut.sum_out[M-1][L0-1:1]}) +
         int'(dut.carry_out[M-1])) >= (1 << L0)) n_vma_wrap <= n_vma_wrap + 1;
  end

  initial begin
    int mode, exact, got, i, upper;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (y != '0) begin failures++; $display("FAIL output not zero after reset"); end
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      if (cyc % SEG == 0) begin
        mode = (cyc / SEG) % 5;
        seg_start = cyc;
        for (int t = 0; t < KC; t++) begin
          case (mode)
            2, 3:    cf[t] = (1 << M) - 1;
            default: cf[t] = int'($urandom % (1 << M));
          endcase
          coef[t] = M'(cf[t]);
        end
        n_reload++;
      end
      case (mode)
        1:       x = ((cyc % 17) == 5) ? N'(1) : N'(0);        // impulses
        2:       x = N'(1 << (N - 1));                          // most negative
        3:       x = N'((1 << (N - 1)) - 1);                    // most positive
        default: x = N'($urandom);
      endcase
      xs[cyc] = signed_x(x);
      @(posedge clk);
      #1;
      i = cyc - LAT;                   // newest sample in the word now at y
      // Right after reset the array must act as if earlier samples were 0.
      if (i - KC + 1 >= seg_start || (seg_start == 0 && i >= 0)) begin
        exact = 0;
        for (int t = 0; t < KC; t++) if (i - t >= 0) exact += cf[t] * xs[i-t];
        got = int'(y[WOK-1:0]);
        checks++;
        if (got != (exact & ((1 << WOK) - 1))) begin
          failures++;
          if (failures < 10)
            $display("FAIL cyc %0d y=%0h expected %0d (low %0d bits)", cyc, y, exact, WOK);
        end
        upper = int'(y[P-1:WOK]);
        if (upper != ((exact < 0) ? (1 << (P - WOK)) - 1 : 0)) n_upper_diff++;
        if (exact < 0) n_neg++;
        if (exact == -KC * ((1 << M) - 1) * (1 << (N - 1))) n_min++;
        if (exact == KC * ((1 << M) - 1) * ((1 << (N - 1)) - 1)) n_max++;
        if (mode == 1 && xs[i] == 1) n_impulse++;
      end
    end
    if (n_neg == 0)      begin failures++; $display("FAIL no negative result"); end
    if (n_dup == 0)      begin failures++; $display("FAIL sum MSB never duplicated"); end
    if (n_vma_wrap == 0) begin failures++; $display("FAIL VMA never dropped a carry"); end
    if (n_reload < 2)    begin failures++; $display("FAIL no coefficient reload"); end
    if (n_min == 0)      begin failures++; $display("FAIL most negative result never reached"); end
    if (n_max == 0)      begin failures++; $display("FAIL most positive result never reached"); end
    if (n_impulse == 0)  begin failures++; $display("FAIL no impulse seen"); end
    $display("events: negative=%0d msb_dup=%0d vma_wrap=%0d reloads=%0d min=%0d max=%0d impulses=%0d",
             n_neg, n_dup, n_vma_wrap, n_reload, n_min, n_max, n_impulse);
    $display("outputs whose bits y^%0d..y^%0d differ from a sign extension: %0d",
             WOK, P - 1, n_upper_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
