// nlfsr_feedback_discrete: time-discrete (arithmetic) model of the NLFSR
// feedback function.
//
// The same function as nlfsr_feedback_gf2, built the way a discrete-time
// system is: register taps are treated as integer samples x[n-1]..x[n-N]
// equal to 0 or 1, each product term is an integer multiplier over the
// taps its row of M selects, and the terms are folded one after another
// with the identity
//     A xor B = A + B - 2*A*B
// using ordinary adders, a subtracter, a multiplier and a gain of 2.
// Starting from 0, term i updates the running value acc to
// acc + p_i - 2*acc*p_i. For the main matrix [1110; 0001] this yields
//     y[n] = x1x2x3 + x4 - 2 x1x2x3x4.
//
// Samples are signed two's complement of DISC_W (4) bits, a choice of this
// design: every partial result stays in -1..2 and the final value is 0 or 1.
// Outputs: y_val is the integer sample, y is y_val read as a bit, and
// in_range flags that y_val is 0 or 1. Purely combinational.
module nlfsr_feedback_discrete #(
  parameter int unsigned            N = nlfsr_pkg::MAIN_N,
  parameter int unsigned            K = nlfsr_pkg::MAIN_K,
  parameter logic [K-1:0][N-1:0]    M = nlfsr_pkg::MAIN_M
) (
  input  logic [N-1:0]   x,
  output nlfsr_pkg::disc_t y_val,
  output logic           y,
  output logic           in_range
);
  import nlfsr_pkg::*;

  // Integer sample of each tap (0 or 1).
  disc_t xs [N];
  for (genvar c = 0; c < N; c++) begin : g_samp
    assign xs[c] = x[c] ? disc_t'(1) : disc_t'(0);
  end

  // Product term of each row: a multiplier over the selected samples.
  disc_t prod [K];
  for (genvar r = 0; r < K; r++) begin : g_prod
    always_comb begin
      disc_t p;
      logic  any;
      p   = disc_t'(1);
      any = 1'b0;
      for (int c = 0; c < N; c++) begin
        if (M[r][N-1-c]) begin
          p   = disc_t'(p * xs[c]);
          any = 1'b1;
        end
      end
      prod[r] = any ? p : disc_t'(0);
    end
  end

  // Fold the terms with A + B - 2AB, row 1 (element K-1) first.
  always_comb begin
    disc_t acc;
    acc = disc_t'(0);
    for (int r = K - 1; r >= 0; r--) begin
      acc = disc_t'(acc + prod[r] - disc_t'(2) * acc * prod[r]);
    end
    y_val = acc;
  end

  assign in_range = (y_val == disc_t'(0)) || (y_val == disc_t'(1));
  assign y        = (y_val == disc_t'(1));

endmodule
