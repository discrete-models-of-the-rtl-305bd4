// nlfsr_feedback_gf2: binary nonlinear feedback function of an NLFSR.
//
// y = XOR over rows i of ( AND over columns j with M[i][j] = 1 of x_j ).
// Each row of the 0/1 matrix M is one product term; a column set to 1
// connects register tap x_j to that product. A row with no 1 at all is an
// absent term and contributes 0. The main configuration, M = [1110; 0001],
// gives y = x1 x2 x3 xor x4: one three-input AND gate and one XOR gate.
//
// Purely combinational. x[0] is tap x1 (cell B1). Matrix rows are N-bit
// literals whose leftmost bit is column 1; row 1 is M[K-1].
module nlfsr_feedback_gf2 #(
  parameter int unsigned            N = nlfsr_pkg::MAIN_N,
  parameter int unsigned            K = nlfsr_pkg::MAIN_K,
  parameter logic [K-1:0][N-1:0]    M = nlfsr_pkg::MAIN_M
) (
  input  logic [N-1:0] x,
  output logic         y
);

  logic [K-1:0] prod;

  for (genvar r = 0; r < K; r++) begin : g_row
    // Column j (1-based) is bit N-j of the row; reverse it onto tap order.
    logic [N-1:0] sel;
    for (genvar c = 0; c < N; c++) begin : g_col
      assign sel[c] = M[r][N-1-c];
    end
    // AND of the selected taps: unselected positions are forced to 1.
    assign prod[r] = (sel != '0) && (&(x | ~sel));
  end

  assign y = ^prod;

endmodule
