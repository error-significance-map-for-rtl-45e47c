// tb_bp_fir_variants: the bit-plane FIR filter in two other configurations.
//
// dut_small: k_C = 2 coefficients of m = 2 bits, l_0 = 4 cells per row,
//   n = 2-bit two's complement input, 6-bit output y^0..y^5. This is the
//   smallest array worked through for the error significance map. Here the
//   whole 6-bit output must be the exact two's complement result. Every
//   combination of coefficients is applied, each with a random stream.
// dut_uns: default size with SIGN_EXT = 0 (zero fill instead of sign
//   extension), fed with unsigned 5-bit samples. All 13 output bits must
//   equal the unsigned result, including the maximum 3*31*15 = 1395.
//
// Both filters get one sample per clock; each output is compared with the
// integer sum of products exactly (m-1)*k_C clocks after its newest sample
// went in. Coefficient changes are followed by a gap in the checks while
// words computed with the old coefficients drain.
module tb_bp_fir_variants;
  // small configuration
  localparam int SKC = 2, SM = 2, SN = 2, SL0 = 4, SP = SL0 + SM;
  localparam int SLAT = (SM - 1) * SKC;
  // unsigned full-size configuration
  localparam int UKC = 3, UM = 4, UN = 5, UL0 = 9, UP = UL0 + UM;
  localparam int ULAT = (UM - 1) * UKC;

  localparam int SEG  = 64;
  localparam int NSEG = 16 * 4;          // all 16 small coefficient sets, 4 times
  localparam int NCYC = SEG * NSEG;

  logic clk, rst_n;
  logic [SN-1:0] xs_in;
  logic [SM-1:0] cs [SKC];
  logic [SP-1:0] ys;
  logic [UN-1:0] xu_in;
  logic [UM-1:0] cu [UKC];
  logic [UP-1:0] yu;

  int hs [NCYC], hu [NCYC];
  int cfs [SKC], cfu [UKC];
  int seg_start;
  int checks = 0, failures = 0, n_small_neg = 0, n_uns_max = 0;

  bp_fir_array #(.KC(SKC), .M(SM), .N(SN), .L0(SL0), .SIGN_EXT(1'b1)) dut_small (
    .clk(clk), .rst_n(rst_n), .x(xs_in), .coef(cs), .y(ys)
  );

  bp_fir_array #(.KC(UKC), .M(UM), .N(UN), .L0(UL0), .SIGN_EXT(1'b0)) dut_uns (
    .clk(clk), .rst_n(rst_n), .x(xu_in), .coef(cu), .y(yu)
  );

  initial begin
    clk   = 1'b0;
    rst_n = 1'b0;
    xs_in = '0;
    xu_in = '0;
    for (int t = 0; t < SKC; t++) cs[t] = '0;
    for (int t = 0; t < UKC; t++) cu[t] = '0;
  end
  always #5 clk = ~clk;

  initial begin
    int exact, i, sel;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      if (cyc % SEG == 0) begin
        seg_start = cyc;
        sel = (cyc / SEG) % 16;
        for (int t = 0; t < SKC; t++) begin
          cfs[t] = (sel >> (SM * t)) & ((1 << SM) - 1);
          cs[t]  = SM'(cfs[t]);
        end
        for (int t = 0; t < UKC; t++) begin
          cfu[t] = ((cyc / SEG) % 8 == 3) ? (1 << UM) - 1 : int'($urandom % (1 << UM));
          cu[t]  = UM'(cfu[t]);
        end
      end
      xs_in = SN'($urandom);
      // second half of every eighth segment: largest input with largest coefficients
      xu_in = ((cyc / SEG) % 8 == 3 && cyc % SEG >= SEG / 2) ? UN'((1 << UN) - 1) : UN'($urandom);
      hs[cyc] = xs_in[SN-1] ? int'(xs_in) - (1 << SN) : int'(xs_in);
      hu[cyc] = int'(xu_in);
      @(posedge clk);
      #1;
      i = cyc - SLAT;
      if (i - SKC + 1 >= seg_start) begin
        exact = 0;
        for (int t = 0; t < SKC; t++) exact += cfs[t] * hs[i-t];
        checks++;
        if (int'(ys) != (exact & ((1 << SP) - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL small cyc %0d y=%0h expected %0d", cyc, ys, exact);
        end
        if (exact < 0) n_small_neg++;
      end
      i = cyc - ULAT;
      if (i - UKC + 1 >= seg_start) begin
        exact = 0;
        for (int t = 0; t < UKC; t++) exact += cfu[t] * hu[i-t];
        checks++;
        if (int'(yu) != exact) begin
          failures++;
          if (failures < 10) $display("FAIL unsigned cyc %0d y=%0d expected %0d", cyc, yu, exact);
        end
        if (exact == UKC * ((1 << UN) - 1) * ((1 << UM) - 1)) n_uns_max++;
      end
    end
    if (n_small_neg == 0) begin failures++; $display("FAIL small: no negative result"); end
    if (n_uns_max == 0)   begin failures++; $display("FAIL unsigned: maximum never reached"); end
    $display("events: small negative=%0d unsigned max=%0d", n_small_neg, n_uns_max);
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
