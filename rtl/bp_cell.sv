// bp_cell: basic cell of the bit-plane FIR array.
//
// The cell forms the partial-product bit x&c (one input bit times one
// coefficient bit) and adds it to two incoming bits a and b with a full
// adder:
//   sum   = a ^ b ^ (x & c)
//   carry = a&b | a&x&c | b&x&c
// These are the cell equations printed with the array drawing. The cell is
// purely combinational; the pipeline registers between rows live in
// bit_plane. In the array, x runs vertically through a column of cells and
// c runs horizontally through a row, so every cell of a row sees the same
// coefficient bit. a and b are symmetric, so which neighbour feeds which
// input does not matter.
module bp_cell (
  input  logic a,      // incoming bit (carry from the row above)
  input  logic b,      // incoming bit (sum from the row above)
  input  logic x,      // input-word bit of this column
  input  logic c,      // coefficient bit of this row
  output logic sum,
  output logic carry
);
  logic p;

  always_comb begin
    p     = x & c;
    sum   = a ^ b ^ p;
    carry = (a & b) | (a & p) | (b & p);
  end
endmodule
