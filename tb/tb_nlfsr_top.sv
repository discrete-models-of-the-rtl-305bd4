// tb_nlfsr_top: end-to-end test of the four-cell NLFSR generator and its
// time-discrete model, at the design's own sizes (no parameter changes).
//
// A reference generator kept in the testbench (register B1..B4 as a bit
// array, feedback x1 x2 x3 xor x4) runs beside the design. After reset the
// output must read 1 1 1 1 0 repeated, period 5, one bit per enabled clock.
// The test covers the mechanisms the design has and counts each:
//   - seed load by reset (at start and again mid-run),
//   - hold while the clock enable is low,
//   - wrap of the five-state cycle back to 1111,
//   - cycles where the gate generator and the integer model agree.
// A mechanism that never happened counts as a failure.
module tb_nlfsr_top;
  logic clk = 1'b0;
  logic rst_n, ce;
  logic [3:0] led;
  logic out_bit, model_out_bit, models_agree;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nlfsr_top dut (.clk, .rst_n, .ce, .led, .out_bit, .model_out_bit,
                 .models_agree);

  bit r [1:4];
  bit fb;
  int n_reset = 0, n_hold = 0, n_wrap = 0, n_agree = 0, n_shift = 0;
  int since_reset = 0;
  bit expected [5] = '{1, 1, 1, 1, 0};

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: led=%b out=%b model=%b agree=%b", what,
               $time, led, out_bit, model_out_bit, models_agree);
    end
  endtask

  task automatic compare();
    chk("register lines", led == {r[4], r[3], r[2], r[1]});
    chk("output is Q3", out_bit == r[4]);
    chk("model output", model_out_bit == r[4]);
    chk("models agree", models_agree);
    if (models_agree) n_agree++;
  endtask

  initial begin
    rst_n = 1'b0; ce = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      // Reset at the start and once mid-run; random gaps in the enable
      // after the first 30 clocks.
      rst_n = !(n == 0 || n == 120);
      ce    = (n < 30) ? 1'b1 : (($urandom % 4) != 0);
      fb    = (r[1] & r[2] & r[3]) ^ r[4];
      @(posedge clk); #1;
      if (!rst_n) begin
        r = '{1, 1, 1, 1};
        n_reset++;
        since_reset = 0;
      end else if (ce) begin
        for (int i = 4; i > 1; i--) r[i] = r[i-1];
        r[1] = fb;
        n_shift++;
        if (r[1] && r[2] && r[3] && r[4]) n_wrap++;
        // Output sequence check: bit k after reset is expected[k mod 5].
        since_reset++;
        chk("sequence 11110", out_bit == expected[since_reset % 5]);
      end else begin
        n_hold++;
      end
      compare();
    end
    $display("mechanisms: reset=%0d shift=%0d hold=%0d wrap=%0d agree=%0d",
             n_reset, n_shift, n_hold, n_wrap, n_agree);
    chk("reset happened", n_reset >= 2);
    chk("hold happened", n_hold > 0);
    chk("cycle wrapped", n_wrap > 0);
    chk("agreement seen", n_agree > 0);
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
