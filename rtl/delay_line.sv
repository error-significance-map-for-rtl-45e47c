// delay_line: WIDTH-bit shift register of DEPTH stages.
//
// Used for the two kinds of delay chains in the bit-plane array: the input
// bus, which delays the input word by k_C cycles per bit-plane so that each
// plane multiplies the same samples, and the chains that hold the low
// output bits y^j (produced early, by plane j) until the full output word is
// ready. Each stage is one register, drawn as a small circle in the array
// drawing. DEPTH = 0 is a plain wire. Registers clear on an active-low
// synchronous reset (the reset style is this design's choice).
module delay_line #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [DEPTH-1:0][WIDTH-1:0] stage;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        stage <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end
endmodule
