// bp_fir_array: semi-systolic bit-plane FIR filter,
//   y_i = c_0*x_i + c_1*x_(i-1) + ... + c_(k_C-1)*x_(i-k_C+1).
//
// Idea: write every coefficient in binary, c_t = sum_j 2^j c_t^j. Then
// y_i = sum_j 2^j * (sum_t c_t^j x_(i-t)): bit-plane j is an FIR filter with
// one-bit coefficients, which needs only AND gates and adders. The array
// stacks m such planes (bit_plane), k_C carry-save rows each, so the
// running sum passes through m*k_C rows, one register stage per row.
//
// Between planes the running sum is multiplied by 1/2: the sum vector moves
// one column towards the least significant end and its lowest bit leaves
// the array as output bit y^j; the carry vector goes straight down (its
// factor 2 and the 1/2 cancel). The most significant sum bit is duplicated
// into the freed top column (sign extension of the sum vector). After the
// last plane the same shift feeds the vector merging adder (vma), which
// adds sum and carry vectors into y^m .. y^(m+l_0-1).
//
// Inside a plane the input word is broadcast to all rows; between planes it
// is delayed by k_C registers, so that plane j combines the same k_C
// samples as plane 0 did k_C*j cycles earlier. Input bit x^i feeds column
// i; columns N .. L0-1 receive the sign bit x^(N-1). The low output bits
// y^0 .. y^(m-1) are delayed so that the whole word appears at once.
//
// Number format: x is two's complement, the coefficients are unsigned
// m-bit numbers. SIGN_EXT = 1 keeps the sign-extension wiring of the
// original array drawing (x sign bit into the upper columns, sum-vector
// MSB duplicated between planes). Duplicating only the sum MSB does not
// sign-extend a carry-save number exactly: with the default sizes, the low
// N+M+2 = 11 bits of y are always the exact two's complement result
// (|y| <= 3*16*15 = 720 fits), while y^11 and y^12 can be wrong for
// negative results. SIGN_EXT = 0 fills with zeros instead; the array is then
// an exact unsigned filter on all L0+M output bits. Both were confirmed by
// simulation, not proven.
//
// Timing: one output word per clock. The running sum spends m*k_C cycles
// in the array. Sample x_i, applied at the input in the cycle before clock
// edge e, takes part in the output visible just after edge e + (m-1)*k_C
// (9 cycles with the defaults); the oldest sample of the same output went
// in k_C-1 edges before. Coefficients are static inputs: changing them
// corrupts the words in flight. Synchronous active-low reset clears all
// registers.
//
// The array structure, the cell equations and the placement of the
// registers follow the published bit-plane array. The adder inside the
// VMA, the reset, the number format and the SIGN_EXT = 0 option are this
// design's own choices.
module bp_fir_array #(
  parameter int unsigned KC       = 3,  // number of coefficients k_C
  parameter int unsigned M        = 4,  // coefficient word length m
  parameter int unsigned N        = 5,  // input word length n
  parameter int unsigned L0       = 9,  // cells per row l_0
  parameter bit          SIGN_EXT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     x,            // input sample
  input  logic [M-1:0]     coef [KC],    // coef[t] = c_t, unsigned
  output logic [L0+M-1:0]  y             // y^0 .. y^(L0+M-1)
);
  localparam int unsigned P = L0 + M;

  // The upper columns must exist for the sign/zero fill and the shift.
  if (L0 <= N) begin : g_bad_width
    $error("bp_fir_array: L0 (%0d) must be larger than N (%0d)", L0, N);
  end
  if (KC < 1 || M < 1) begin : g_bad_count
    $error("bp_fir_array: KC and M must be at least 1");
  end

  logic [N-1:0]  x_tap     [M];   // input word seen by plane j
  logic [L0-1:0] xw        [M];   // extended to the row width
  logic [KC-1:0] cbits     [M];   // bit j of every coefficient
  logic [L0-1:0] sum_in    [M];
  logic [L0-1:0] carry_in  [M];
  logic [L0-1:0] sum_out   [M];
  logic [L0-1:0] carry_out [M];
  logic [M-1:0]  y_low;

  // Sum vector leaving plane j, shifted one place right, with the MSB
  // duplicated (or zero-filled) at the top.
  function automatic logic [L0-1:0] shift_sum(input logic [L0-1:0] s);
    return {SIGN_EXT ? s[L0-1] : 1'b0, s[L0-1:1]};
  endfunction

  assign x_tap[0] = x;

  for (genvar j = 0; j < int'(M); j++) begin : g_plane
    if (j > 0) begin : g_xbus
      delay_line #(.WIDTH(N), .DEPTH(KC)) u_xdelay (
        .clk  (clk),
        .rst_n(rst_n),
        .d    (x_tap[j-1]),
        .q    (x_tap[j])
      );
    end

    for (genvar i = 0; i < int'(L0); i++) begin : g_xw
      if (i < int'(N)) begin : g_bit
        assign xw[j][i] = x_tap[j][i];
      end else begin : g_ext
        assign xw[j][i] = SIGN_EXT ? x_tap[j][N-1] : 1'b0;
      end
    end

    for (genvar t = 0; t < int'(KC); t++) begin : g_cbit
      assign cbits[j][t] = coef[t][j];
    end

    if (j == 0) begin : g_top
      assign sum_in[j]   = '0;
      assign carry_in[j] = '0;
    end else begin : g_link
      assign sum_in[j]   = shift_sum(sum_out[j-1]);
      assign carry_in[j] = carry_out[j-1];
    end

    bit_plane #(.KC(KC), .L0(L0)) u_plane (
      .clk      (clk),
      .rst_n    (rst_n),
      .sum_in   (sum_in[j]),
      .carry_in (carry_in[j]),
      .xw       (xw[j]),
      .cbits    (cbits[j]),
      .sum_out  (sum_out[j]),
      .carry_out(carry_out[j])
    );

    // Output bit y^j leaves at the end of plane j and waits for the rest.
    if (j < int'(M) - 1) begin : g_ydelay
      delay_line #(.WIDTH(1), .DEPTH((M-1-j)*KC)) u_ydelay (
        .clk  (clk),
        .rst_n(rst_n),
        .d    (sum_out[j][0]),
        .q    (y_low[j])
      );
    end else begin : g_ylast
      assign y_low[j] = sum_out[j][0];
    end
  end

  vma #(.W(L0)) u_vma (
    .sum_vec  (shift_sum(sum_out[M-1])),
    .carry_vec(carry_out[M-1]),
    .result   (y[P-1:M])
  );

  assign y[M-1:0] = y_low;
endmodule
