// tb_nlfsr_shift_reg: self-checking test of the NLFSR shift register.
//
// Drives random serial input and clock-enable values into a four-cell and
// a seven-cell register and compares every tap after each clock edge with a
// reference kept as a plain bit array in the testbench. Checks the seed
// load on reset (also mid-run), one-cycle shift latency, hold with ce low,
// and that the output bit is the last cell.
module tb_nlfsr_shift_reg;
  logic clk = 1'b0;
  logic rst_n, ce, sin;
  logic [3:0] taps4;
  logic       out4;
  logic [6:0] taps7;
  logic       out7;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nlfsr_shift_reg dut4 (.clk, .rst_n, .ce, .sin, .taps(taps4), .out_bit(out4));
  nlfsr_shift_reg #(.N(7), .SEED(7'b1010011)) dut7 (
    .clk, .rst_n, .ce, .sin, .taps(taps7), .out_bit(out7));

  // Reference: ref4[1] is cell B1, ref4[4] is cell B4.
  bit ref4 [1:4];
  bit ref7 [1:7];

  task automatic check(string what);
    bit ok = 1'b1;
    for (int i = 1; i <= 4; i++) if (taps4[i-1] !== ref4[i]) ok = 1'b0;
    for (int i = 1; i <= 7; i++) if (taps7[i-1] !== ref7[i]) ok = 1'b0;
    if (out4 !== ref4[4] || out7 !== ref7[7]) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: taps4=%b taps7=%b", what, taps4, taps7);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0; ce = 1'b1; sin = 1'b0;
    @(posedge clk); #1;
    ref4 = '{1, 1, 1, 1};
    ref7 = '{1, 1, 0, 0, 1, 0, 1};   // SEED bit 0 = B1
    check("seed load");
    rst_n = 1'b1;
  endtask

  int holds = 0;
  initial begin
    do_reset();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      ce  = ($urandom % 4) != 0;
      sin = 1'($urandom % 2);
      if (n == 200) rst_n = 1'b0;
      @(posedge clk); #1;
      if (!rst_n) begin
        ref4 = '{1, 1, 1, 1};
        ref7 = '{1, 1, 0, 0, 1, 0, 1};
        rst_n = 1'b1;
      end else if (ce) begin
        for (int i = 4; i > 1; i--) ref4[i] = ref4[i-1];
        ref4[1] = sin;
        for (int i = 7; i > 1; i--) ref7[i] = ref7[i-1];
        ref7[1] = sin;
      end else begin
        holds++;
      end
      check("shift");
    end
    if (holds == 0) begin
      failures++;
      $display("FAIL: clock enable never held the register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
