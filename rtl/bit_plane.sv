// bit_plane: one bit-plane (BP) of the bit-plane FIR array.
//
// A bit-plane holds k_C rows of l_0 cells. Plane j multiplies the input word
// by bit j of every coefficient and accumulates the k_C one-bit products:
// row 0 uses bit j of c_(k_C-1), the last row bit j of c_0. Each row is a
// carry-save adder: a cell takes the sum bit from the cell above in the same
// column (b) and the carry from the cell above one column to the right (a),
// so carries move one place towards the most significant end per row (the
// factor 2 between rows). The carry out of the leftmost column of a row
// falls off the array, so the plane works modulo 2^l_0 in its own weights.
// The first row instead takes its sum and carry vectors from the ports,
// which the parent wires from the previous plane (or ties to zero for the
// first plane).
//
// The input word xw reaches all k_C rows of the plane at once (broadcast
// within the plane, which is what makes the array semi-systolic). Column 0
// is the least significant.
//
// Timing: every row ends in a register stage for its sum and carry vectors,
// so sum_out/carry_out are the first row's inputs k_C clocks later plus the
// k_C products, each taken with the xw present when that row worked on the
// data. Synchronous active-low reset clears the registers (reset is this
// design's choice).
module bit_plane #(
  parameter int unsigned KC = 3,   // coefficients = rows per plane
  parameter int unsigned L0 = 9    // cells per row
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [L0-1:0] sum_in,    // sum vector into row 0, column weights
  input  logic [L0-1:0] carry_in,  // carry vector into row 0, column weights
  input  logic [L0-1:0] xw,        // input word, already extended to L0 bits
  input  logic [KC-1:0] cbits,     // cbits[t] = bit j of coefficient c_t
  output logic [L0-1:0] sum_out,   // registered sum vector of the last row
  output logic [L0-1:0] carry_out  // registered carry vector of the last row;
                                   // carry_out[i] has weight i+1
);
  logic [KC-1:0][L0-1:0] s_q;  // row output registers
  logic [KC-1:0][L0-1:0] c_q;
  logic [KC-1:0][L0-1:0] s_d;  // row outputs before the registers
  logic [KC-1:0][L0-1:0] c_d;

  if (L0 < 2 || KC < 1) begin : g_bad_size
    $error("bit_plane: needs L0 >= 2 and KC >= 1");
  end

  for (genvar r = 0; r < int'(KC); r++) begin : g_row
    logic [L0-1:0] a_in, b_in;
    logic          cbit;

    assign cbit = cbits[KC-1-r];

    if (r == 0) begin : g_first
      assign a_in = carry_in;
      assign b_in = sum_in;
    end else begin : g_next
      assign a_in = {c_q[r-1][L0-2:0], 1'b0};
      assign b_in = s_q[r-1];
    end

    for (genvar i = 0; i < int'(L0); i++) begin : g_col
      bp_cell u_cell (
        .a    (a_in[i]),
        .b    (b_in[i]),
        .x    (xw[i]),
        .c    (cbit),
        .sum  (s_d[r][i]),
        .carry(c_d[r][i])
      );
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        s_q[r] <= '0;
        c_q[r] <= '0;
      end else begin
        s_q[r] <= s_d[r];
        c_q[r] <= c_d[r];
      end
    end
  end

  assign sum_out   = s_q[KC-1];
  assign carry_out = c_q[KC-1];
endmodule
