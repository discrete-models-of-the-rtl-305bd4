// nlfsr_top: the four-cell NLFSR generator y = x1 x2 x3 xor x4 as built on
// an FPGA, with its time-discrete model running beside it.
//
// The hardware generator is a four-bit serial-in shift register with clock
// enable (lines Q0..Q3 = cells B1..B4) whose serial input is
// XOR( AND3(Q0, Q1, Q2), Q3 ). Started from 1111 it repeats the output
// sequence 1 1 1 1 0 on Q3 with period 5. The four register lines drive
// LED1..LED4 and Q3 is the output.
//
// Beside it runs a second generator of the same matrix and seed whose
// feedback is the integer model y[n] = x1x2x3 + x4 - 2 x1x2x3x4. The two
// share clock, reset and enable, so their states must match on every cycle;
// models_agree reports that, together with the model sample being 0 or 1.
// The lock-step comparison is this design's addition.
//
// Timing: one output bit per clock with ce high; rst_n low at a clock edge
// loads 1111 into both registers.
module nlfsr_top
  import nlfsr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  output logic [3:0] led,
  output logic       out_bit,
  output logic       model_out_bit,
  output logic       models_agree
);

  logic [MAIN_N-1:0] hw_taps, model_taps;
  logic              hw_y, model_y;
  logic              hw_range, model_range;
  disc_t             hw_val, model_val;

  nlfsr_generator #(
    .N(MAIN_N), .K(MAIN_K), .M(MAIN_M), .SEED(MAIN_SEED), .MODEL(FB_GF2)
  ) u_hw (
    .clk         (clk),
    .rst_n       (rst_n),
    .ce          (ce),
    .taps        (hw_taps),
    .y           (hw_y),
    .out_bit     (out_bit),
    .fb_val      (hw_val),
    .fb_in_range (hw_range)
  );

  nlfsr_generator #(
    .N(MAIN_N), .K(MAIN_K), .M(MAIN_M), .SEED(MAIN_SEED), .MODEL(FB_DISCRETE)
  ) u_model (
    .clk         (clk),
    .rst_n       (rst_n),
    .ce          (ce),
    .taps        (model_taps),
    .y           (model_y),
    .out_bit     (model_out_bit),
    .fb_val      (model_val),
    .fb_in_range (model_range)
  );

  assign led          = hw_taps;
  assign models_agree = (hw_taps == model_taps) && (hw_y == model_y)
                        && (hw_val == model_val) && hw_range && model_range;

endmodule
