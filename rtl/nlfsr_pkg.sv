// nlfsr_pkg: constants and types shared by the NLFSR generator blocks.
//
// A nonlinear-feedback shift register (NLFSR) is described by a 0/1 matrix M
// with K rows and N columns. Row i selects which register taps x1..xN are
// multiplied (ANDed) together into product i; the feedback bit is the GF(2)
// sum (XOR) of the K products. A matrix row is written as an N-bit literal
// whose leftmost bit is column 1 (tap x1), so rows read like the printed
// matrix; in a packed [K-1:0][N-1:0] parameter, row 1 is element K-1.
//
// The main configuration is the four-cell generator y = x1*x2*x3 xor x4 with
// initial state 1111, which repeats 1111 0 with period 5. The two example
// matrices of the method description are kept here for the testbenches.
package nlfsr_pkg;

  // Main generator: matrix [1 1 1 0; 0 0 0 1], four cells, seed 1111.
  localparam int unsigned           MAIN_N    = 4;
  localparam int unsigned           MAIN_K    = 2;
  localparam logic [1:0][3:0]       MAIN_M    = {4'b1110, 4'b0001};
  localparam logic [3:0]            MAIN_SEED = 4'b1111;
  localparam int unsigned           MAIN_PERIOD = 5;

  // Example with four cells and three products: x1x3x4 xor x1x2 xor x4.
  localparam logic [2:0][3:0]       EX1_M = {4'b1011, 4'b1100, 4'b0001};
  // Example with three cells: x1 xor x2 xor x1x3.
  localparam logic [2:0][2:0]       EX2_M = {3'b100, 3'b010, 3'b101};

  // Width of the signed samples of the time-discrete feedback model.
  localparam int unsigned           DISC_W = 4;
  typedef logic signed [DISC_W-1:0] disc_t;

  // How the feedback function is built inside a generator.
  typedef enum logic {
    FB_GF2      = 1'b0,   // AND/XOR gates
    FB_DISCRETE = 1'b1    // multipliers, adders and a gain of 2
  } fb_model_e;

endpackage
