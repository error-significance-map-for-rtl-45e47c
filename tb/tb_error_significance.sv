// tb_error_significance: which cells of the array can disturb which output
// bit, measured by fault injection on the smallest array (k_C = 2
// coefficients of m = 2 bits, l_0 = 4 cells per row, 2-bit input).
//
// Two copies of the filter get the same inputs. In the second one, one cell
// output (sum or carry) at a time is held at 0 or at 1. For each cell and
// each output weight k = 2..5 the bench records whether any fault in that
// cell ever changed the two bits of weight k entering the vector merging
// adder (the carry-save pair that the array delivers for y^k). That is the
// reach of the cell through the array. It ignores carries that ripple
// inside the final adder.
//
// The measured reach is compared with two references:
//  - the connection rule of the array graph: a cell in row r (0..3) with
//    bit weight w reaches the output of weight k (output row 4) exactly
//    when 0 <= k - w <= 4 - r. Sums keep their weight from row to row and
//    carries gain one, so after d rows a cell can reach weights w .. w+d.
//  - the error significance maps of this array, as published for y^5, y^4,
//    y^3 and y^2, written below cell by cell (columns for fictive graph
//    positions with no cell left out).
// How many cells also change y^k itself through the adder's carry chain is
// printed for information.
module tb_error_significance;
  localparam int KC = 2, M = 2, N = 2, L0 = 4, P = L0 + M;
  localparam int ROWS = KC * M;
  localparam int NCELL = ROWS * L0;
  localparam int NFAULT = NCELL * 4;          // sum/carry stuck at 0/1
  localparam int SEG = 24;                     // cycles per coefficient set
  localparam int RUN = 16 * SEG;               // all 16 coefficient sets

  // Published maps. MAP[k-2][row] holds the cells of one row, bit i is the
  // cell in column i (column 0 = least significant). Row 0 is the top row.
  localparam logic [L0-1:0] MAP [4][ROWS] = '{
    '{4'b0111, 4'b0111, 4'b0011, 4'b0011},    // y^2
    '{4'b1111, 4'b1111, 4'b0111, 4'b0110},    // y^3
    '{4'b1111, 4'b1110, 4'b1110, 4'b1100},    // y^4
    '{4'b1110, 4'b1100, 4'b1100, 4'b1000}     // y^5
  };

  logic          clk, rst_n;
  logic [N-1:0]  x;
  logic [M-1:0]  coef [KC];
  logic [P-1:0]  y_ref, y_flt;
  int            fault_sel;                    // -1: no fault
  logic [3:0]    reach_arr [NCELL];            // per cell, bit k-2
  logic [3:0]    reach_out [NCELL];
  int checks = 0, failures = 0;

  bp_fir_array #(.KC(KC), .M(M), .N(N), .L0(L0)) dut_ref (
    .clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .y(y_ref)
  );
  bp_fir_array #(.KC(KC), .M(M), .N(N), .L0(L0)) dut_flt (
    .clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .y(y_flt)
  );

  initial begin
    clk       = 1'b0;
    rst_n     = 1'b0;
    x         = '0;
    fault_sel = -1;
    for (int t = 0; t < KC; t++) coef[t] = '0;
  end
  always #5 clk = ~clk;

  // Fault injection, one static path per cell output.
  for (genvar j = 0; j < M; j++) begin : g_fj
    for (genvar r = 0; r < KC; r++) begin : g_fr
      for (genvar i = 0; i < L0; i++) begin : g_fi
        localparam int ID = ((j * KC + r) * L0 + i) * 4;
        // Forced for the whole run: the normal cell function unless this
        // cell is the one selected, so releasing is never needed.
        initial begin
          force dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.sum =
            (fault_sel == ID)     ? 1'b0 :
            (fault_sel == ID + 1) ? 1'b1 :
            (dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.a ^
             dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.b ^
             dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.p);
          force dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.carry =
            (fault_sel == ID + 2) ? 1'b0 :
            (fault_sel == ID + 3) ? 1'b1 :
            ((dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.a &
              dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.b) |
             (dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.a &
              dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.p) |
             (dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.b &
              dut_flt.g_plane[j].u_plane.g_row[r].g_col[i].u_cell.p));
        end
      end
    end
  end

  // Carry-save pair of weight k entering the final adder: index k-M of the
  // shifted sum vector and of the carry vector.
  function automatic logic [1:0] pair(input logic [L0-1:0] s, input logic [L0-1:0] c, input int idx);
    logic [L0-1:0] sh;
    sh = {s[L0-1], s[L0-1:1]};
    return {sh[idx], c[idx]};
  endfunction

  initial begin
    int cid, row, w, k, n_out_only, n_map_diff;
    for (int c = 0; c < NCELL; c++) begin
      reach_arr[c] = '0;
      reach_out[c] = '0;
    end
    for (int f = 0; f < NFAULT; f++) begin
      rst_n = 1'b0;
      fault_sel = -1;
      repeat (2) @(posedge clk);
      #1;
      rst_n = 1'b1;
      fault_sel = f;
      cid = f / 4;
      for (int cyc = 0; cyc < RUN; cyc++) begin
        if (cyc % SEG == 0)
          for (int t = 0; t < KC; t++) coef[t] = M'((cyc / SEG) >> (M * t));
        x = N'($urandom);
        @(posedge clk);
        #1;
        for (int kk = M; kk < P; kk++) begin
          if (pair(dut_ref.sum_out[M-1], dut_ref.carry_out[M-1], kk - M) !=
              pair(dut_flt.sum_out[M-1], dut_flt.carry_out[M-1], kk - M))
            reach_arr[cid][kk-2] = 1'b1;
          if (y_ref[kk] != y_flt[kk]) reach_out[cid][kk-2] = 1'b1;
        end
      end
    end
    fault_sel = -1;

    n_out_only = 0;
    n_map_diff = 0;
    for (int c = 0; c < NCELL; c++) begin
      row = c / L0;
      w = (c % L0) + row / KC;                 // bit weight of the cell
      for (k = 2; k < P; k++) begin
        logic graph_rule, published;
        graph_rule = (k - w >= 0) && (k - w <= ROWS - row);
        published  = MAP[k-2][row][c % L0];
        checks += 2;
        if (reach_arr[c][k-2] != graph_rule) begin
          failures++;
          $display("FAIL cell row %0d col %0d, y^%0d: measured %0d, graph rule %0d",
                   row, c % L0, k, reach_arr[c][k-2], graph_rule);
        end
        if (graph_rule != published) begin
          failures++;
          n_map_diff++;
          $display("FAIL cell row %0d col %0d, y^%0d: graph rule %0d, published map %0d",
                   row, c % L0, k, graph_rule, published);
        end
        if (reach_out[c][k-2] && !reach_arr[c][k-2]) n_out_only++;
      end
    end
    for (k = P - 1; k >= 2; k--) begin
      $display("cells reaching the y^%0d pair (row 0 first, most significant column left):", k);
      for (int r = 0; r < ROWS; r++) begin
        string s;
        s = "";
        for (int i = L0 - 1; i >= 0; i--) s = {s, reach_arr[r*L0+i][k-2] ? " 1" : " 0"};
        $display("  %s", s);
      end
    end
    $display("cell/bit pairs that change y^k only through the final adder's carries: %0d", n_out_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFAULT * (RUN + 3) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
