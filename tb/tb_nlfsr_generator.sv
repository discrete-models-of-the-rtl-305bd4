// tb_nlfsr_generator: self-checking test of complete NLFSR generators.
//
// 1. The main generator (y = x1x2x3 xor x4, seed 1111) with gate feedback
//    and with the integer model: the output must be 1 1 1 1 0 repeated
//    (period 5), one bit per clock, from the first clock after reset.
// 2. The three-product four-cell generator with both feedback models,
//    compared every cycle with a reference register and feedback equation
//    kept in the testbench, from all 16 seeds, with random clock enable.
module tb_nlfsr_generator;
  import nlfsr_pkg::*;
  logic clk = 1'b0;
  logic rst_n, ce;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [3:0] t_g, t_d;
  logic y_g, y_d, o_g, o_d, r_g, r_d;
  disc_t v_g, v_d;

  nlfsr_generator dut_gate (
    .clk, .rst_n, .ce, .taps(t_g), .y(y_g), .out_bit(o_g), .fb_val(v_g),
    .fb_in_range(r_g));
  nlfsr_generator #(.MODEL(FB_DISCRETE)) dut_disc (
    .clk, .rst_n, .ce, .taps(t_d), .y(y_d), .out_bit(o_d), .fb_val(v_d),
    .fb_in_range(r_d));

  // Three-product example generator, one gate and one integer-model copy
  // started from each of the 16 seeds.
  logic [3:0] t_e1g [16], t_e1d [16];
  logic       y_e1g [16], y_e1d [16], o_e1g [16], o_e1d [16], r_e1d [16];
  for (genvar sd = 0; sd < 16; sd++) begin : g_seed
    logic  r_e1g_unused;
    disc_t v_e1g, v_e1d;
    nlfsr_generator #(.N(4), .K(3), .M(EX1_M), .SEED(4'(sd))) dut_e1g (
      .clk, .rst_n, .ce, .taps(t_e1g[sd]), .y(y_e1g[sd]), .out_bit(o_e1g[sd]),
      .fb_val(v_e1g), .fb_in_range(r_e1g_unused));
    nlfsr_generator #(.N(4), .K(3), .M(EX1_M), .SEED(4'(sd)),
                      .MODEL(FB_DISCRETE)) dut_e1d (
      .clk, .rst_n, .ce, .taps(t_e1d[sd]), .y(y_e1d[sd]), .out_bit(o_e1d[sd]),
      .fb_val(v_e1d), .fb_in_range(r_e1d[sd]));
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit expected [5] = '{1, 1, 1, 1, 0};
  bit r [1:4];
  bit fb;
  logic [3:0] rs [16];
  int ones = 0;

  initial begin

    // Part 1: main generator, ce always high.
    rst_n = 1'b0; ce = 1'b1;
    @(posedge clk); #1;
    rst_n = 1'b1;
    chk("seed 1111", t_g == 4'b1111 && t_d == 4'b1111);
    for (int n = 0; n < 25; n++) begin
      chk("gate sequence", o_g == expected[n % 5]);
      chk("model sequence", o_d == expected[n % 5]);
      chk("model range", r_d && r_g && v_d == v_g);
      ones += o_g;
      @(posedge clk); #1;
    end
    chk("period 5 (four ones per five bits)", ones == 20);

    // Part 2: example generators against a reference, random enable.
    @(negedge clk);
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int sd = 0; sd < 16; sd++) rs[sd] = 4'(sd);   // bit 0 = B1
    for (int n = 0; n < 40; n++) begin
      for (int sd = 0; sd < 16; sd++) begin
        {r[4], r[3], r[2], r[1]} = rs[sd];
        fb = (r[1] & r[3] & r[4]) ^ (r[1] & r[2]) ^ r[4];
        chk("ex1 gate taps", t_e1g[sd] == rs[sd]);
        chk("ex1 model taps", t_e1d[sd] == rs[sd]);
        chk("ex1 out", o_e1g[sd] == r[4] && o_e1d[sd] == r[4]);
        chk("ex1 feedback", y_e1g[sd] == fb && y_e1d[sd] == fb && r_e1d[sd]);
      end
      @(negedge clk);
      ce = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (ce) begin
        for (int sd = 0; sd < 16; sd++) begin
          {r[4], r[3], r[2], r[1]} = rs[sd];
          fb = (r[1] & r[3] & r[4]) ^ (r[1] & r[2]) ^ r[4];
          rs[sd] = {r[3], r[2], r[1], fb};
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
