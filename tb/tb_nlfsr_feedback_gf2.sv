// tb_nlfsr_feedback_gf2: self-checking test of the binary feedback function.
//
// Applies every input pattern to four instances and compares y with the
// feedback equations written out by hand:
//   main matrix [1110; 0001]          y = x1 x2 x3 xor x4
//   matrix [1011; 1100; 0001]         y = x1 x3 x4 xor x1 x2 xor x4
//   matrix [100; 010; 101]            y = x1 xor x2 xor x1 x3
//   matrix [0000; 0110] (empty row)   y = x2 x3
module tb_nlfsr_feedback_gf2;
  import nlfsr_pkg::*;
  logic [3:0] x4;
  logic [2:0] x3;
  logic y_main, y_ex1, y_ex2, y_zero;
  int checks = 0, failures = 0;

  nlfsr_feedback_gf2 dut_main (.x(x4), .y(y_main));
  nlfsr_feedback_gf2 #(.N(4), .K(3), .M(EX1_M)) dut_ex1 (.x(x4), .y(y_ex1));
  nlfsr_feedback_gf2 #(.N(3), .K(3), .M(EX2_M)) dut_ex2 (.x(x3), .y(y_ex2));
  nlfsr_feedback_gf2 #(.N(4), .K(2), .M({4'b0000, 4'b0110})) dut_zero (
    .x(x4), .y(y_zero));

  task automatic cmp(string what, logic got, logic exp, int v);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%b: got %b expected %b", what, v[3:0], got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit a1, a2, a3, a4;
      x4 = v[3:0];
      x3 = v[2:0];
      {a4, a3, a2, a1} = v[3:0];   // x[0] is tap x1
      #1;
      cmp("main", y_main, (a1 & a2 & a3) ^ a4, v);
      cmp("ex1",  y_ex1,  (a1 & a3 & a4) ^ (a1 & a2) ^ a4, v);
      cmp("zero", y_zero, a2 & a3, v);
      if (v < 8) cmp("ex2", y_ex2, a1 ^ a2 ^ (a1 & a3), v);
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
