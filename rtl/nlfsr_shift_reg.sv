// nlfsr_shift_reg: the linear shift register (LSR) of an NLFSR generator.
//
// N cells B1..BN. On each rising clock edge with ce high the serial input
// (the feedback bit y) enters B1 and every cell moves one place towards BN;
// BN is the generator's output bit. All cells are brought out as taps:
// taps[0] = B1 = x1, ..., taps[N-1] = BN = xN, matching lines Q0..Q3 of a
// four-bit serial-in shift register with clock enable.
//
// Reset: rst_n low at a clock edge loads SEED (default 1111, the initial
// state used for the main generator). Loading a seed by reset is this
// design's choice; the original hardware relied on the register's power-up
// state with its clear input tied low. ce low holds the state. The taps
// change one clock edge after the input is sampled (one cycle latency).
module nlfsr_shift_reg #(
  parameter int unsigned    N    = nlfsr_pkg::MAIN_N,
  parameter logic [N-1:0]   SEED = nlfsr_pkg::MAIN_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         sin,
  output logic [N-1:0] taps,
  output logic         out_bit
);

  logic [N-1:0] cells;

  if (N > 1) begin : g_multi
    always_ff @(posedge clk) begin
      if (!rst_n)  cells <= SEED;
      else if (ce) cells <= {cells[N-2:0], sin};
    end
  end else begin : g_single
    always_ff @(posedge clk) begin
      if (!rst_n)  cells <= SEED;
      else if (ce) cells <= sin;
    end
  end

  // Bit 0 is B1 (first cell); the shift moves bit i to bit i+1.
  assign taps    = cells;
  assign out_bit = cells[N-1];

endmodule
