// tb_nlfsr_feedback_discrete: self-checking test of the time-discrete
// (integer) feedback model.
//
// For every input pattern it evaluates the difference equations by hand in
// integer arithmetic and compares them with the model's integer sample:
//   main matrix:   y = x1x2x3 + x4 - 2 x1x2x3x4
//   3-cell example: s = x1 + x2 - 2 x1x2;  y = s + x1x3 - 2 s x1x3
// and for the three-term four-cell example it compares with the XOR of its
// products. It also checks that the sample is always 0 or 1 (in_range) and
// that the bit output equals the sample.
module tb_nlfsr_feedback_discrete;
  import nlfsr_pkg::*;
  logic [3:0] x4;
  logic [2:0] x3;
  disc_t v_main, v_ex1, v_ex2;
  logic  y_main, y_ex1, y_ex2, r_main, r_ex1, r_ex2;
  int checks = 0, failures = 0;

  nlfsr_feedback_discrete dut_main (
    .x(x4), .y_val(v_main), .y(y_main), .in_range(r_main));
  nlfsr_feedback_discrete #(.N(4), .K(3), .M(EX1_M)) dut_ex1 (
    .x(x4), .y_val(v_ex1), .y(y_ex1), .in_range(r_ex1));
  nlfsr_feedback_discrete #(.N(3), .K(3), .M(EX2_M)) dut_ex2 (
    .x(x3), .y_val(v_ex2), .y(y_ex2), .in_range(r_ex2));

  task automatic cmp(string what, int got, int exp, int v);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%b: got %0d expected %0d", what, v[3:0], got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      int a1, a2, a3, a4, s, e;
      x4 = v[3:0];
      x3 = v[2:0];
      a1 = v & 1; a2 = (v >> 1) & 1; a3 = (v >> 2) & 1; a4 = (v >> 3) & 1;
      #1;
      e = a1*a2*a3 + a4 - 2*a1*a2*a3*a4;
      cmp("main value", int'(v_main), e, v);
      cmp("main bit", int'(y_main), e, v);
      cmp("main range", int'(r_main), 1, v);
      e = ((a1 & a3 & a4) ^ (a1 & a2) ^ a4);
      cmp("ex1 value", int'(v_ex1), e, v);
      cmp("ex1 range", int'(r_ex1), 1, v);
      if (v < 8) begin
        s = a1 + a2 - 2*a1*a2;
        e = s + a1*a3 - 2*s*a1*a3;
        cmp("ex2 value", int'(v_ex2), e, v);
        cmp("ex2 bit", int'(y_ex2), e, v);
        cmp("ex2 range", int'(r_ex2), 1, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
