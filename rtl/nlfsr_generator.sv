// nlfsr_generator: a complete nonlinear-feedback shift-register generator.
//
// An N-cell shift register whose first cell B1 is loaded, on every enabled
// clock edge, with the feedback bit y = f(x1..xN) computed from its own taps;
// the last cell BN is the output bit. f is given by the 0/1 matrix M (see
// nlfsr_pkg). MODEL chooses how f is built: FB_GF2 as AND/XOR gates, or
// FB_DISCRETE as the time-discrete integer model (multipliers, adders, gain
// of 2). Both produce the same bit sequence; having both behind one
// parameter is this design's choice.
//
// Timing: one output bit per enabled clock. rst_n low at a clock edge loads
// SEED; ce low holds the state. fb_val is the feedback as a signed integer
// sample (for the gate model simply 0 or 1); fb_in_range is 1 whenever that
// sample is 0 or 1 (constant 1 for the gate model).
module nlfsr_generator
  import nlfsr_pkg::*;
#(
  parameter int unsigned            N     = MAIN_N,
  parameter int unsigned            K     = MAIN_K,
  parameter logic [K-1:0][N-1:0]    M     = MAIN_M,
  parameter logic [N-1:0]           SEED  = MAIN_SEED,
  parameter fb_model_e              MODEL = FB_GF2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  output logic [N-1:0] taps,
  output logic         y,
  output logic         out_bit,
  output disc_t        fb_val,
  output logic         fb_in_range
);

  nlfsr_shift_reg #(.N(N), .SEED(SEED)) u_lsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .ce      (ce),
    .sin     (y),
    .taps    (taps),
    .out_bit (out_bit)
  );

  if (MODEL == FB_GF2) begin : g_gf2
    nlfsr_feedback_gf2 #(.N(N), .K(K), .M(M)) u_fb (
      .x (taps),
      .y (y)
    );
    assign fb_val      = y ? disc_t'(1) : disc_t'(0);
    assign fb_in_range = 1'b1;
  end else begin : g_disc
    nlfsr_feedback_discrete #(.N(N), .K(K), .M(M)) u_fb (
      .x        (taps),
      .y_val    (fb_val),
      .y        (y),
      .in_range (fb_in_range)
    );
  end

endmodule
