// tb_csa_tree: checks the multi-operand carry-save adder against a plain sum
// with three operands (the filter's pair-sum adder), two operands (the
// output adders) and five operands, using signed random and extreme values.
module tb_csa_tree;
  int checks = 0, failures = 0;

  logic [26:0] op3 [3];  logic [26:0] s3;
  logic [27:0] op2 [2];  logic [27:0] s2;
  logic [19:0] op5 [5];  logic [19:0] s5;

  csa_tree #(.N(3), .W(27)) dut3 (.op(op3), .sum(s3));
  csa_tree #(.N(2), .W(28)) dut2 (.op(op2), .sum(s2));
  csa_tree #(.N(5), .W(20)) dut5 (.op(op5), .sum(s5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint r3, r2, r5;
      r3 = 0; r2 = 0; r5 = 0;
      for (int k = 0; k < 3; k++) begin
        // signed 25-bit pair sums, sign-extended, extremes now and then
        logic signed [24:0] v;
        v = (i % 7 == 0) ? ((k % 2) ? 25'sh1000000 : 25'sh0ffffff) : 25'($urandom);
        op3[k] = 27'(v);
        r3 += longint'(v);
      end
      for (int k = 0; k < 2; k++) begin
        logic signed [26:0] v;
        v = 27'($urandom);
        op2[k] = 28'(v);
        r2 += longint'(v);
      end
      for (int k = 0; k < 5; k++) begin
        op5[k] = 20'($urandom);
        r5 += longint'(op5[k]);
      end
      #1;
      checks += 3;
      if (signed'(s3) !== 27'(r3)) begin failures++; $display("FAIL N=3 %0d vs %0d", signed'(s3), r3); end
      if (signed'(s2) !== 28'(r2)) begin failures++; $display("FAIL N=2 %0d vs %0d", signed'(s2), r2); end
      if (s5 !== 20'(r5))          begin failures++; $display("FAIL N=5 %0d vs %0d", s5, r5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
